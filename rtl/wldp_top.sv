// wldp_top -- watchdog processor with loop detection and prediction (WLDP).
//
// A concurrent control flow checker that runs beside a main processor. The
// processor reports every retired instruction (retire_hit, retiring_addr).
// The watchdog steps through a reference program of nodes, one per basic
// block entry and per branch, held in its own memory. It raises `error` as
// soon as the retired address stream leaves the control flow graph that the
// reference program describes. A loop detection module remembers the tail
// and head nodes of up to two loops (and, once a loop has been left, its
// exit node) and supplies them itself, so a loop iteration after the first
// costs no watchdog-memory read.
//
// Structure: RPM (address-break detection) -> retire queue -> CPM (node
// execution, stack, error handler). The CPM fetches nodes either from the
// watchdog memory or, when the LDM raises a loop hit, from the LDM. The
// memory read is suppressed on a hit and a registered select picks the
// source in the next cycle. The four modules and their connections follow
// the architecture of the scheme. The retire queue, the load port and the
// status outputs are this design's additions.
//
// Use: write the reference program through prog_* (node 0 must be the
// starting node), pulse `start`, then let the processor run. mem_read pulses
// for every watchdog memory read; loop_hit_1/2 for every node supplied by
// loop entry 1/2; loop_valid shows which loop entries are in use.
// Timing: the check of a retired instruction completes two to three cycles
// after its retire_hit; error then stays set until the next start.
module wldp_top
  import wldp_pkg::*;
#(
  parameter int unsigned NODES       = 16,
  parameter int unsigned ADDR_W      = 32,
  parameter int unsigned ADDR_STEP   = 1,
  parameter int unsigned STACK_DEPTH = 8,
  parameter int unsigned QUEUE_DEPTH = 4,
  localparam int unsigned AW         = (NODES > 1) ? $clog2(NODES) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  // main processor
  input  logic              retire_hit,
  input  logic [ADDR_W-1:0] retiring_addr,
  // reference program load
  input  logic              prog_we,
  input  logic [AW-1:0]     prog_addr,
  input  node_type_e        prog_type,
  input  logic [ADDR_W-1:0] prog_ref,
  input  logic [AW-1:0]     prog_off,
  // status
  output logic              active,
  output logic              error,
  output err_e              error_code,
  output logic [AW-1:0]     wd_pc,
  output logic              mem_read,
  output logic              loop_hit_1,
  output logic              loop_hit_2,
  output logic [1:0]        loop_valid
);

  // RPM -> queue
  logic              ev_valid, ev_break;
  logic [ADDR_W-1:0] ev_addr;
  // queue -> CPM
  logic              q_valid, q_break, q_ready, q_ovf;
  logic [ADDR_W-1:0] q_addr;
  // CPM <-> memory / LDM
  logic              fetch_req;
  logic [AW-1:0]     fetch_addr, fetch_from;
  node_type_e        mem_type, ldm_type, in_type;
  logic [ADDR_W-1:0] mem_ref, ldm_ref, in_ref;
  logic [AW-1:0]     mem_off, ldm_off, in_off;
  logic              exec_valid;
  logic [AW-1:0]     exec_addr, exec_off;
  node_type_e        exec_type;
  logic [ADDR_W-1:0] exec_ref;
  logic              hit;
  logic [1:0]        hit_vec;
  logic              next_valid;
  logic [AW-1:0]     next_node;
  logic              sel_ldm_q;
  logic              cpm_error, ovf_q;
  err_e              cpm_code;

  wldp_rpm #(.ADDR_W(ADDR_W), .ADDR_STEP(ADDR_STEP)) u_rpm (
    .clk, .rst_n, .restart(start),
    .retire_hit, .retiring_addr,
    .ev_valid, .ev_addr, .ev_break
  );

  wldp_retq #(.ADDR_W(ADDR_W), .DEPTH(QUEUE_DEPTH)) u_retq (
    .clk, .rst_n, .flush(start),
    .push(ev_valid), .push_addr(ev_addr), .push_break(ev_break),
    .out_valid(q_valid), .out_addr(q_addr), .out_break(q_break), .out_ready(q_ready),
    .overflow(q_ovf)
  );

  wldp_cpm #(.NODES(NODES), .ADDR_W(ADDR_W), .STACK_DEPTH(STACK_DEPTH)) u_cpm (
    .clk, .rst_n, .start,
    .ret_valid(q_valid), .ret_addr(q_addr), .ret_break(q_break), .ret_ready(q_ready),
    .fetch_req, .fetch_addr, .fetch_from,
    .node_type_in(in_type), .node_ref_in(in_ref), .node_off_in(in_off),
    .exec_valid, .exec_addr, .exec_type, .exec_ref, .exec_off,
    .ldm_next_valid(next_valid), .ldm_next_node(next_node),
    .pc(wd_pc), .active, .error(cpm_error), .error_code(cpm_code)
  );

  wldp_ldm #(.NODES(NODES), .ADDR_W(ADDR_W), .LOOPS(2)) u_ldm (
    .clk, .rst_n, .clear(start),
    .fetch_req, .fetch_addr, .fetch_from,
    .exec_valid, .exec_addr, .exec_type, .exec_ref, .exec_off,
    .loop_hit(hit), .loop_hit_vec(hit_vec),
    .ldm_type, .ldm_ref, .ldm_off, .loop_valid,
    .next_valid, .next_node
  );

  assign mem_read = fetch_req && !hit;

  wldp_wmem #(.NODES(NODES), .ADDR_W(ADDR_W)) u_wmem (
    .clk,
    .rd_en(mem_read), .rd_addr(fetch_addr),
    .rd_type(mem_type), .rd_ref(mem_ref), .rd_off(mem_off),
    .wr_en(prog_we), .wr_addr(prog_addr), .wr_type(prog_type), .wr_ref(prog_ref), .wr_off(prog_off)
  );

  // reference information: LDM on a loop hit, watchdog memory otherwise
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         sel_ldm_q <= 1'b0;
    else if (fetch_req) sel_ldm_q <= hit;
  end

  assign in_type = sel_ldm_q ? ldm_type : mem_type;
  assign in_ref  = sel_ldm_q ? ldm_ref  : mem_ref;
  assign in_off  = sel_ldm_q ? ldm_off  : mem_off;

  // a lost retire event is reported as an error as well
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 ovf_q <= 1'b0;
    else if (start)             ovf_q <= 1'b0;
    else if (q_ovf && active)   ovf_q <= 1'b1;
  end

  assign error      = cpm_error || ovf_q;
  assign error_code = ovf_q ? ERR_QUEUE : cpm_code;
  assign loop_hit_1 = hit_vec[0];
  assign loop_hit_2 = hit_vec[1];

endmodule
