// wldp_rpm -- retiring address processing module (RPM).
//
// Each time the main processor retires an instruction (retire_hit) the RPM
// takes the retiring address, compares it with the previous retiring address
// incremented by ADDR_STEP, and reports an address break when they differ.
// The first retire after `restart` always reports a break, since there is no
// previous address to continue from. Register, incrementer and comparator
// follow the RPM description; the registered output, the restart input and
// the step size are this design's choices.
//
// Interface: retire_hit/retiring_addr from the processor; ev_valid, ev_addr,
// ev_break towards the central processing module.
// Timing: one cycle; the event for a retire in cycle t is valid in cycle t+1.
// One retire per cycle is accepted.
module wldp_rpm #(
  parameter int unsigned ADDR_W    = 32,
  parameter int unsigned ADDR_STEP = 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              restart,
  input  logic              retire_hit,
  input  logic [ADDR_W-1:0] retiring_addr,
  output logic              ev_valid,
  output logic [ADDR_W-1:0] ev_addr,
  output logic              ev_break
);

  logic [ADDR_W-1:0] prev_addr;
  logic              have_prev;
  logic [ADDR_W-1:0] expected;

  assign expected = prev_addr + ADDR_W'(ADDR_STEP);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev_addr <= '0;
      have_prev <= 1'b0;
      ev_valid  <= 1'b0;
      ev_addr   <= '0;
      ev_break  <= 1'b0;
    end else begin
      ev_valid <= retire_hit;
      if (retire_hit) begin
        ev_addr   <= retiring_addr;
        ev_break  <= !have_prev || (retiring_addr != expected);
        prev_addr <= retiring_addr;
        have_prev <= 1'b1;
      end else if (restart) begin
        have_prev <= 1'b0;
      end
    end
  end

endmodule
