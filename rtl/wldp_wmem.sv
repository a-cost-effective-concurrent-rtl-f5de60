// wldp_wmem -- watchdog memory holding the reference program.
//
// One word per node with the three fields of a watchdog instruction: node
// type, reference address and offset. The read port is synchronous: a read
// requested in cycle t (rd_en, rd_addr) returns its word in cycle t+1 and the
// output holds until the next read. The write port loads the reference
// program before checking starts. NODES defaults to the sixteen words drawn
// in the architecture figure; the port layout and the synchronous read are
// this design's choices.
module wldp_wmem #(
  parameter int unsigned NODES  = 16,
  parameter int unsigned ADDR_W = 32,
  localparam int unsigned AW    = (NODES > 1) ? $clog2(NODES) : 1
) (
  input  logic                 clk,
  input  logic                 rd_en,
  input  logic [AW-1:0]        rd_addr,
  output wldp_pkg::node_type_e rd_type,
  output logic [ADDR_W-1:0]    rd_ref,
  output logic [AW-1:0]        rd_off,
  input  logic                 wr_en,
  input  logic [AW-1:0]        wr_addr,
  input  wldp_pkg::node_type_e wr_type,
  input  logic [ADDR_W-1:0]    wr_ref,
  input  logic [AW-1:0]        wr_off
);

  localparam int unsigned WW = 3 + ADDR_W + AW;

  logic [WW-1:0] mem [NODES];
  logic [WW-1:0] q;

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= {wr_type, wr_ref, wr_off};
    if (rd_en) q <= mem[rd_addr];
  end

  assign rd_type = wldp_pkg::node_type_e'(q[WW-1 -: 3]);
  assign rd_ref  = q[AW +: ADDR_W];
  assign rd_off  = q[AW-1:0];

endmodule
