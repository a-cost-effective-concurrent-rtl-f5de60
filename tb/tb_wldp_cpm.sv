// tb_wldp_cpm -- unit test of the central processing module.
//
// A small behavioural node memory answers every fetch one cycle later.
// Retire events are fed directly on the valid/ready port. Scripted event
// sequences exercise every node type: starting, proceeding, forward
// conditional branch taken and not taken (with its retry cycle), call,
// return, backward unconditional and conditional branches. After each event
// the test checks the watchdog PC, the stack depth and the error state
// against values worked out by hand from the node table. Separate sequences
// check the four error causes: an unexpected address break, a wrong
// instruction after a branch, return-stack overflow (stack depth 2 here) and
// underflow, and that the LDM's fall-through address is used when offered.
module tb_wldp_cpm;
  import wldp_pkg::*;

  localparam int unsigned AW = 4;

  logic              clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic              ret_valid = 1'b0, ret_break = 1'b0, ret_ready;
  logic [31:0]       ret_addr = '0;
  logic              fetch_req;
  logic [AW-1:0]     fetch_addr, fetch_from;
  node_type_e        node_type_in;
  logic [31:0]       node_ref_in;
  logic [AW-1:0]     node_off_in;
  logic              exec_valid;
  logic [AW-1:0]     exec_addr, exec_off;
  node_type_e        exec_type;
  logic [31:0]       exec_ref;
  logic              ldm_next_valid = 1'b0;
  logic [AW-1:0]     ldm_next_node = '0;
  logic [AW-1:0]     pc;
  logic              active, error;
  err_e              error_code;

  node_type_e  m_type [16];
  logic [31:0] m_ref  [16];
  logic [3:0]  m_off  [16];
  int checks = 0, failures = 0, n_alt_fetch = 0;
  logic [AW-1:0] last_alt_addr;

  always #5 clk = ~clk;

  wldp_cpm #(.NODES(16), .ADDR_W(32), .STACK_DEPTH(2)) dut (
    .clk, .rst_n, .start, .ret_valid, .ret_addr, .ret_break, .ret_ready,
    .fetch_req, .fetch_addr, .fetch_from, .node_type_in, .node_ref_in, .node_off_in,
    .exec_valid, .exec_addr, .exec_type, .exec_ref, .exec_off,
    .ldm_next_valid, .ldm_next_node, .pc, .active, .error, .error_code
  );

  // node memory: registered read
  always_ff @(posedge clk) begin
    if (fetch_req) begin
      node_type_in <= m_type[fetch_addr];
      node_ref_in  <= m_ref[fetch_addr];
      node_off_in  <= m_off[fetch_addr];
    end
  end

  always @(posedge clk) if (dut.do_alt) begin n_alt_fetch++; last_alt_addr = fetch_addr; end

  task automatic node(int i, node_type_e t, int unsigned r, int off = 0);
    m_type[i] = t; m_ref[i] = r; m_off[i] = 4'(off);
  endtask

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  task automatic do_start();
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
  endtask

  // send one event and wait until it is accepted
  task automatic ev(int unsigned a, bit brk);
    ret_valid = 1'b1; ret_addr = a; ret_break = brk;
    do @(posedge clk); while (!ret_ready);
    @(negedge clk);
    ret_valid = 1'b0;
  endtask

  // event, then expected pc, stack depth and error
  task automatic step(int unsigned a, bit brk, int exp_pc, int exp_sp, bit exp_err);
    ev(a, brk);
    check(pc == AW'(exp_pc) && dut.sp_q == 2'(exp_sp) && error == exp_err,
          $sformatf("event %h/%0b: pc %0d sp %0d err %0b, expected %0d %0d %0b",
                    a, brk, pc, dut.sp_q, error, exp_pc, exp_sp, exp_err));
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) node(i, NT_PROC, 'hFFFF);
    node(0, NT_START, 'h100);
    node(1, NT_PROC,  'h102);
    node(2, NT_CFB,   'h104, 2);       // -> 4
    node(3, NT_PROC,  'h105);
    node(4, NT_CALL,  'h108, 3);       // -> 7
    node(5, NT_PROC,  'h109);
    node(6, NT_UBB,   'h10A, 16 - 5);  // -> 1
    node(7, NT_PROC,  'h120);
    node(8, NT_RET,   'h121);
    node(9, NT_CBB,   'h130, 16 - 9);  // -> 0
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check(!active && !error, "idle after reset");

    // ---- every node type on a legal path
    do_start();
    step('h100, 1, 1, 0, 0);   // starting node
    step('h101, 0, 1, 0, 0);   // inside block
    step('h102, 0, 2, 0, 0);   // proceeding
    step('h103, 0, 2, 0, 0);
    step('h104, 0, 4, 0, 0);   // conditional forward: predicted taken
    step('h105, 0, 4, 0, 0);   // not taken: retried against node 3, pc -> 4
    check(n_alt_fetch == 1 && last_alt_addr == 3, "fall-through node 3 fetched");
    step('h106, 0, 4, 0, 0);
    step('h107, 0, 4, 0, 0);
    step('h108, 0, 7, 1, 0);   // call
    step('h120, 1, 8, 1, 0);   // subroutine entry
    step('h121, 0, 5, 0, 0);   // return
    step('h109, 1, 6, 0, 0);   // return point
    step('h10A, 0, 1, 0, 0);   // unconditional backward
    step('h102, 1, 2, 0, 0);   // loop head
    step('h104, 0, 4, 0, 0);   // conditional forward
    step('h108, 1, 7, 1, 0);   // taken: target is the call node, pc -> 7
    check(n_alt_fetch == 1, "no retry when the branch is taken");
    check(error_code == ERR_NONE, "no error on the legal path");

    // ---- unexpected address break inside a block
    do_start();
    step('h100, 1, 1, 0, 0);
    step('h107, 1, 1, 0, 1);
    check(error_code == ERR_BREAK, "break error code");
    step('h102, 0, 1, 0, 1);   // halted: events discarded

    // ---- wrong instruction after an unconditional branch
    do_start();
    step('h100, 1, 1, 0, 0);
    step('h102, 0, 2, 0, 0);
    step('h104, 0, 4, 0, 0);
    step('h108, 1, 7, 1, 0);
    step('h120, 1, 8, 1, 0);
    step('h121, 0, 5, 0, 0);
    step('h109, 1, 6, 0, 0);
    step('h10A, 0, 1, 0, 0);
    step('h10B, 0, 1, 0, 1);   // jump did not happen
    check(error_code == ERR_BRANCH, "branch error code");

    // ---- conditional branch to neither target nor fall-through
    do_start();
    step('h100, 1, 1, 0, 0);
    step('h102, 0, 2, 0, 0);
    step('h104, 0, 4, 0, 0);
    step('h150, 1, 3, 0, 1);
    check(error_code == ERR_BREAK, "wrong conditional target detected");

    // ---- stack overflow: node 4 calls itself (stack depth 2)
    node(4, NT_CALL, 'h108, 0);
    do_start();
    step('h100, 1, 1, 0, 0);
    step('h102, 0, 2, 0, 0);
    step('h104, 0, 4, 0, 0);
    step('h108, 1, 4, 1, 0);
    step('h108, 1, 4, 2, 0);
    step('h108, 1, 4, 2, 1);
    check(error_code == ERR_STK_OVF, "stack overflow code");

    // ---- stack underflow: return without call
    node(1, NT_RET, 'h102);
    do_start();
    step('h100, 1, 1, 0, 0);
    step('h102, 0, 1, 0, 1);
    check(error_code == ERR_STK_UNF, "stack underflow code");

    // ---- loop tail with the fall-through node offered by the LDM
    node(1, NT_PROC, 'h102);
    node(2, NT_CBB, 'h104, 16 - 1);    // -> 1
    node(12, NT_PROC, 'h105);
    do_start();
    step('h100, 1, 1, 0, 0);
    step('h102, 0, 2, 0, 0);
    ldm_next_valid = 1'b1; ldm_next_node = 4'd12;
    step('h104, 0, 1, 0, 0);   // backward taken predicted
    ldm_next_valid = 1'b0;
    step('h105, 0, 13, 0, 0);  // exit through node 12
    check(last_alt_addr == 12, "LDM fall-through address used");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
