// tb_wldp_ldm -- unit test of the loop detection module.
//
// Drives the CPM side (executed nodes and fetch requests) directly and
// checks detection, prediction, the limit of two loops and release:
//   * a backward branch allocates an entry (tail 5, head 2, prev 4, next 6);
//   * the head is not predicted before its contents were captured;
//   * after capture, fetching the tail from the previous node and the head
//     from the tail raises loop_hit and returns the stored node one cycle
//     later; other fetches do not hit;
//   * next_node offers tail+1 while the tail is executed; once the node
//     after the tail has run, a later exit fetch of it hits as well;
//   * a second, nested loop takes entry 2; a third loop nested in both gets
//     no entry;
//   * entries stay after the loops are left; a sibling loop replaces the
//     entry that does not enclose it; clear empties all.
module tb_wldp_ldm;
  import wldp_pkg::*;

  logic          clk = 1'b0, rst_n = 1'b0, clear = 1'b0;
  logic          fetch_req = 1'b0;
  logic [3:0]    fetch_addr = '0, fetch_from = '0;
  logic          exec_valid = 1'b0;
  logic [3:0]    exec_addr = '0, exec_off = '0;
  node_type_e    exec_type = NT_PROC;
  logic [31:0]   exec_ref = '0;
  logic          loop_hit;
  logic [1:0]    loop_hit_vec, loop_valid;
  node_type_e    ldm_type;
  logic [31:0]   ldm_ref;
  logic [3:0]    ldm_off;
  logic          next_valid;
  logic [3:0]    next_node;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  wldp_ldm dut (
    .clk, .rst_n, .clear, .fetch_req, .fetch_addr, .fetch_from,
    .exec_valid, .exec_addr, .exec_type, .exec_ref, .exec_off,
    .loop_hit, .loop_hit_vec, .ldm_type, .ldm_ref, .ldm_off, .loop_valid,
    .next_valid, .next_node
  );

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  task automatic exec(int a, node_type_e t, int unsigned r, int off);
    @(negedge clk);
    exec_valid = 1'b1; exec_addr = 4'(a); exec_type = t; exec_ref = r; exec_off = 4'(off);
    #1;
    if (t == NT_CBB && a == 5) check(next_valid == dut.ent[0].valid && (!next_valid || next_node == 6),
                                     "next node offered for a known tail");
    @(negedge clk);
    exec_valid = 1'b0;
  endtask

  // fetch; expected hit vector; if hit, expected node one cycle later
  task automatic fetch(int a, int from, logic [1:0] exp_hit, node_type_e t = NT_PROC, int unsigned r = 0);
    @(negedge clk);
    fetch_req = 1'b1; fetch_addr = 4'(a); fetch_from = 4'(from);
    #1;
    check(loop_hit_vec == exp_hit && loop_hit == (exp_hit != 0),
          $sformatf("fetch %0d from %0d: hit %b, expected %b", a, from, loop_hit_vec, exp_hit));
    @(negedge clk);
    fetch_req = 1'b0;
    if (exp_hit != 0)
      check(ldm_type == t && ldm_ref == r,
            $sformatf("predicted node %0d: %0d/%h, expected %0d/%h", a, ldm_type, ldm_ref, t, r));
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check(loop_valid == 2'b00, "empty after reset");
    // first iteration: head 2 executed before the tail is known
    exec(2, NT_PROC, 'h202, 0);
    exec(4, NT_PROC, 'h204, 0);
    fetch(5, 4, 2'b00);
    exec(5, NT_CBB, 'h205, 13);                 // tail: 5 + 13 = 2 (mod 16)
    check(loop_valid == 2'b01, "loop 1 detected");
    fetch(2, 5, 2'b00);                         // head not captured yet
    exec(2, NT_PROC, 'h202, 0);                 // captured now
    exec(4, NT_PROC, 'h204, 0);
    fetch(5, 4, 2'b01, NT_CBB, 'h205);          // tail predicted
    fetch(5, 3, 2'b00);                         // not from the previous node
    exec(5, NT_CBB, 'h205, 13);
    check(loop_valid == 2'b01, "no second entry for the same tail");
    fetch(2, 5, 2'b01, NT_PROC, 'h202);         // head predicted
    fetch(3, 5, 2'b00);
    // second loop inside the first: tail 4, head 3
    exec(4, NT_UBB, 'h204, 15);
    check(loop_valid == 2'b11, "loop 2 detected");
    exec(3, NT_PROC, 'h203, 0);
    fetch(4, 3, 2'b10, NT_UBB, 'h204);
    fetch(3, 4, 2'b10, NT_PROC, 'h203);
    // third loop nested in both: no entry
    exec(3, NT_CBB, 'h203, 0);
    check(loop_valid == 2'b11, "third nested loop not taken");
    fetch(4, 3, 2'b10, NT_UBB, 'h204);
    fetch(5, 4, 2'b01, NT_CBB, 'h205);
    // loop 1 left: its next node is read from memory the first time
    fetch(6, 5, 2'b00);
    // entries stay after the loops are left
    exec(6, NT_PROC, 'h206, 0);
    check(loop_valid == 2'b11, "entries kept after leaving");
    fetch(6, 5, 2'b01, NT_PROC, 'h206);         // next node predicted now
    fetch(6, 4, 2'b00);
    fetch(5, 4, 2'b01, NT_CBB, 'h205);
    // a sibling loop replaces the first entry that does not enclose it
    exec(9, NT_UBB, 'h209, 15);
    check(loop_valid == 2'b11, "both entries still in use");
    fetch(5, 4, 2'b00);                         // loop 1 was replaced
    fetch(9, 8, 2'b01, NT_UBB, 'h209);
    fetch(4, 3, 2'b10, NT_UBB, 'h204);
    // clear
    @(negedge clk); clear = 1'b1; @(negedge clk); clear = 1'b0;
    check(loop_valid == 2'b00, "clear empties the entries");
    fetch(9, 8, 2'b00);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
