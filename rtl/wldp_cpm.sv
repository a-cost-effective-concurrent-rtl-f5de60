// wldp_cpm -- central processing module (CPM) of the watchdog processor.
//
// The CPM walks the reference program in step with the main processor. It
// holds the watchdog PC, the node at that PC, a return stack and the error
// handler. For every retire event it compares the retiring address with the
// current node's reference address:
//   * equal: the node type analyzer executes the node. Starting and
//     proceeding nodes go to PC+1. Branch nodes go to the target PC+offset
//     (modulo 2**AW, so an AW-bit offset reaches every node). Conditional
//     branches also save PC+1 as the fall-through node. A call pushes PC+1
//     and goes to the target; a return pops its successor from the stack.
//     The next node is fetched at once.
//   * not equal, a conditional branch was just taken as predicted: the
//     branch actually fell through. The saved fall-through node is fetched
//     and the same event is checked again against it one cycle later.
//   * not equal after an unconditional branch, call or return (the very next
//     instruction must be the target), or not equal while the RPM flags an
//     address break: control flow error.
//   * otherwise the instruction is an ordinary one inside a basic block.
// Node semantics and the stack follow the scheme; the stop-on-error
// behaviour, the retry cycle for fall-throughs and the error causes are this
// design's choices.
//
// Interface: ret_* is a valid/ready stream of retire events (address and
// address-break flag). fetch_req/fetch_addr request a node; the node arrives
// on node_*_in in the next cycle (from the watchdog memory or, on a loop hit,
// from the LDM). fetch_from is the address of the node whose execution caused
// the fetch. exec_* reports every executed node to the LDM; for a loop tail
// the LDM answers with its stored next node, which becomes the fall-through
// node. `start` (one cycle) restarts checking at node 0.
// Timing: one retire event per cycle; a fall-through of a conditional branch
// costs one extra cycle. After an error the CPM stops checking (error stays
// high) and discards events until the next start.
module wldp_cpm
  import wldp_pkg::*;
#(
  parameter int unsigned NODES       = 16,
  parameter int unsigned ADDR_W      = 32,
  parameter int unsigned STACK_DEPTH = 8,
  localparam int unsigned AW         = (NODES > 1) ? $clog2(NODES) : 1,
  localparam int unsigned SPW        = $clog2(STACK_DEPTH + 1),
  localparam int unsigned SIW        = (STACK_DEPTH > 1) ? $clog2(STACK_DEPTH) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  // retire events from the RPM (through the retire queue)
  input  logic              ret_valid,
  input  logic [ADDR_W-1:0] ret_addr,
  input  logic              ret_break,
  output logic              ret_ready,
  // node fetch
  output logic              fetch_req,
  output logic [AW-1:0]     fetch_addr,
  output logic [AW-1:0]     fetch_from,
  input  node_type_e        node_type_in,
  input  logic [ADDR_W-1:0] node_ref_in,
  input  logic [AW-1:0]     node_off_in,
  // executed node, to the LDM
  output logic              exec_valid,
  output logic [AW-1:0]     exec_addr,
  output node_type_e        exec_type,
  output logic [ADDR_W-1:0] exec_ref,
  output logic [AW-1:0]     exec_off,
  input  logic              ldm_next_valid,
  input  logic [AW-1:0]     ldm_next_node,
  // status
  output logic [AW-1:0]     pc,
  output logic              active,
  output logic              error,
  output err_e              error_code
);

  // ---------------------------------------------------------------- state
  logic [AW-1:0]     pc_q;
  logic              fetch_pend_q;   // node_*_in carries the node at pc_q
  node_type_e        node_type_q;
  logic [ADDR_W-1:0] node_ref_q;
  logic [AW-1:0]     node_off_q;
  logic              strict_q;       // next retire must hit this node
  logic              alt_valid_q;    // fall-through node saved
  logic [AW-1:0]     alt_addr_q;
  logic [AW-1:0]     alt_from_q;
  logic              active_q;
  logic              err_q;
  err_e              err_code_q;
  logic [AW-1:0]     stack [STACK_DEPTH];
  logic [SPW-1:0]    sp_q;

  // current node: straight from the fetch in the cycle it arrives
  node_type_e        cur_type;
  logic [ADDR_W-1:0] cur_ref;
  logic [AW-1:0]     cur_off;

  assign cur_type = fetch_pend_q ? node_type_in : node_type_q;
  assign cur_ref  = fetch_pend_q ? node_ref_in  : node_ref_q;
  assign cur_off  = fetch_pend_q ? node_off_in  : node_off_q;

  // ------------------------------------------------- node type analyzer
  logic          checking, addr_equal;
  logic [AW-1:0] pc_inc, target;
  logic          do_exec, do_alt, do_err;
  err_e          err_cause;
  logic [AW-1:0] next_pc;
  logic          next_strict, next_alt, push, pop;

  assign checking   = active_q && !err_q && ret_valid;
  assign addr_equal = (ret_addr == cur_ref);          // address comparator
  assign pc_inc     = pc_q + 1'b1;                    // increment
  assign target     = pc_q + cur_off;                 // target address calculator

  always_comb begin
    do_exec     = 1'b0;
    do_alt      = 1'b0;
    do_err      = 1'b0;
    err_cause   = ERR_NONE;
    next_pc     = pc_inc;
    next_strict = 1'b0;
    next_alt    = 1'b0;
    push        = 1'b0;
    pop         = 1'b0;
    ret_ready   = !active_q || err_q;   // drain while idle or halted
    if (checking) begin
      if (addr_equal) begin
        ret_ready = 1'b1;
        do_exec   = 1'b1;
        unique case (cur_type)
          NT_START, NT_PROC: begin
            next_pc = pc_inc;
          end
          NT_UBB, NT_UFB: begin
            next_pc     = target;
            next_strict = 1'b1;
          end
          NT_CBB, NT_CFB: begin
            next_pc  = target;
            next_alt = 1'b1;
          end
          NT_CALL: begin
            next_pc     = target;
            next_strict = 1'b1;
            if (sp_q == SPW'(STACK_DEPTH)) begin
              do_err    = 1'b1;
              err_cause = ERR_STK_OVF;
            end else begin
              push = 1'b1;
            end
          end
          NT_RET: begin
            next_strict = 1'b1;
            if (sp_q == '0) begin
              do_err    = 1'b1;
              err_cause = ERR_STK_UNF;
            end else begin
              pop     = 1'b1;
              next_pc = stack[SIW'(sp_q - 1'b1)];
            end
          end
          default: ;
        endcase
        if (do_err) do_exec = 1'b0;
      end else if (alt_valid_q) begin
        // predicted-taken conditional branch fell through: retry the event
        ret_ready = 1'b0;
        do_alt    = 1'b1;
      end else if (strict_q || ret_break) begin
        ret_ready = 1'b1;
        do_err    = 1'b1;
        err_cause = strict_q ? ERR_BRANCH : ERR_BREAK;
      end else begin
        ret_ready = 1'b1;   // ordinary instruction inside a basic block
      end
    end
  end

  // ----------------------------------------------------------- fetch mux
  always_comb begin
    fetch_req  = 1'b0;
    fetch_addr = next_pc;
    fetch_from = pc_q;
    if (start) begin
      fetch_req  = 1'b1;
      fetch_addr = '0;
    end else if (do_exec) begin
      fetch_req  = 1'b1;
      fetch_addr = next_pc;
    end else if (do_alt) begin
      fetch_req  = 1'b1;
      fetch_addr = alt_addr_q;
      fetch_from = alt_from_q;
    end
  end

  assign exec_valid = do_exec;
  assign exec_addr  = pc_q;
  assign exec_type  = cur_type;
  assign exec_ref   = cur_ref;
  assign exec_off   = cur_off;

  // ------------------------------------------------------------ registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc_q         <= '0;
      fetch_pend_q <= 1'b0;
      node_type_q  <= NT_START;
      node_ref_q   <= '0;
      node_off_q   <= '0;
      strict_q     <= 1'b0;
      alt_valid_q  <= 1'b0;
      alt_addr_q   <= '0;
      alt_from_q   <= '0;
      active_q     <= 1'b0;
      err_q        <= 1'b0;
      err_code_q   <= ERR_NONE;
      sp_q         <= '0;
    end else if (start) begin
      pc_q         <= '0;
      fetch_pend_q <= 1'b1;
      strict_q     <= 1'b0;
      alt_valid_q  <= 1'b0;
      active_q     <= 1'b1;
      err_q        <= 1'b0;
      err_code_q   <= ERR_NONE;
      sp_q         <= '0;
    end else begin
      fetch_pend_q <= fetch_req;
      if (fetch_pend_q) begin
        node_type_q <= node_type_in;
        node_ref_q  <= node_ref_in;
        node_off_q  <= node_off_in;
      end
      if (do_exec) begin
        pc_q        <= next_pc;
        strict_q    <= next_strict;
        alt_valid_q <= next_alt;
        alt_addr_q  <= ldm_next_valid ? ldm_next_node : pc_inc;
        alt_from_q  <= pc_q;
        if (push) sp_q <= sp_q + 1'b1;
        if (pop)  sp_q <= sp_q - 1'b1;
      end else if (do_alt) begin
        pc_q        <= alt_addr_q;
        strict_q    <= 1'b0;
        alt_valid_q <= 1'b0;
      end
      if (do_err) begin
        err_q      <= 1'b1;
        err_code_q <= err_cause;
      end
    end
  end

  // return stack
  always_ff @(posedge clk) begin
    if (!start && push) stack[SIW'(sp_q)] <= pc_inc;
  end

  // the error stays until the next start; the stack never over- or underruns
  a_err_sticky: assert property (@(posedge clk) disable iff (!rst_n)
    err_q && !start |=> err_q);
  a_sp_range: assert property (@(posedge clk) disable iff (!rst_n)
    sp_q <= SPW'(STACK_DEPTH));
  // every requested node arrives in the next cycle and is used there
  a_fetch: assert property (@(posedge clk) disable iff (!rst_n)
    fetch_req |=> fetch_pend_q);

  assign pc         = pc_q;
  assign active     = active_q;
  assign error      = err_q;
  assign error_code = err_code_q;

endmodule
