// wldp_retq -- retire event queue between the RPM and the CPM.
//
// The CPM normally checks one retire event per cycle, but needs one extra
// cycle when a conditional branch falls through (it must fetch the
// fall-through node first). This small FIFO absorbs those bubbles. It is this
// design's own addition; the scheme itself does not specify how the CPM keeps
// pace with the processor. If an event arrives while the queue is full it is
// lost and `overflow` pulses, which the top reports as an error.
//
// Interface: push/push_addr/push_break in; pop side is valid/ready.
// Timing: an event pushed in cycle t can be popped in cycle t+1. Assertions
// check the valid/ready rule on the output side.
module wldp_retq #(
  parameter int unsigned ADDR_W = 32,
  parameter int unsigned DEPTH  = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              flush,
  input  logic              push,
  input  logic [ADDR_W-1:0] push_addr,
  input  logic              push_break,
  output logic              out_valid,
  output logic [ADDR_W-1:0] out_addr,
  output logic              out_break,
  input  logic              out_ready,
  output logic              overflow
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [ADDR_W:0] mem [DEPTH];
  logic [PW-1:0]   rd_ptr, wr_ptr;
  logic [PW:0]     count;
  logic            do_push, do_pop;

  assign out_valid = (count != '0);
  assign {out_break, out_addr} = mem[rd_ptr];
  assign do_pop  = out_valid && out_ready;
  assign do_push = push && ((count != (PW+1)'(DEPTH)) || do_pop);
  assign overflow = push && !do_push;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else if (flush) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_push) begin
        wr_ptr <= (wr_ptr == PW'(DEPTH-1)) ? '0 : wr_ptr + 1'b1;
      end
      if (do_pop) begin
        rd_ptr <= (rd_ptr == PW'(DEPTH-1)) ? '0 : rd_ptr + 1'b1;
      end
      count <= count + (PW+1)'(do_push) - (PW+1)'(do_pop);
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= {push_break, push_addr};
  end

  // valid/ready: an offered event stays offered, unchanged, until taken
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready && !flush |=> out_valid && $stable(out_addr) && $stable(out_break));
  a_count: assert property (@(posedge clk) disable iff (!rst_n) count <= (PW+1)'(DEPTH));

endmodule
