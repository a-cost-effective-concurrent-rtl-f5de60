// wldp_ldm -- loop detection module (LDM).
//
// The LDM keeps the nodes of up to LOOPS loops (two by default, which is why
// only two levels of a nested loop are predicted) so that the CPM need not
// read them from the watchdog memory on every iteration. Each loop entry
// holds the loop tail node, the loop head node, the fall-through node, the
// previous node address (tail-1) and the next node address (tail+1).
//   * Detection: when the CPM executes a backward-branch node (node type
//     010 or 100) that no entry holds, a free entry records it as a loop
//     tail. Its head address is tail+offset, prev and next come from the
//     decrement and increment logic. The head node's and the next node's
//     contents are captured the next time the CPM executes each of them.
//   * Prediction: when the CPM fetches the tail right after executing the
//     previous node, or fetches the head right after executing the tail,
//     the entry raises its loop_hit line. The watchdog memory read is
//     suppressed and the LDM delivers the stored node in the next cycle.
//     After the first iteration both nodes come from the LDM.
//   * Exit: when the loop ends, the CPM fetches the next node right after
//     the tail. Once the loop has been left once, that node is stored too
//     and is also delivered by the LDM.
//   * Replacement: entries stay after their loop ends, so an inner loop that
//     is entered again on the next outer iteration is predicted from its
//     first tail fetch on. A new loop takes a free entry, or else an entry
//     whose [head, tail] range does not contain the new tail. A loop never
//     evicts a loop that encloses it, which is why in a triple nest the
//     innermost loop is only checked, not predicted.
// Registers, the increment/decrement of the tail address, the comparators
// and the two loop_hit lines follow the LDM description; the replacement rule,
// the capture of the head and next nodes on their first execution and the
// choice of the "from" node as the trigger are this design's reading of it.
//
// When the CPM executes a tail the entry holds, next_node gives the CPM the
// index of the fall-through node for the loop exit (for its retry).
//
// Interface: fetch_* and exec_* come from the CPM. loop_hit (combinational)
// gates the memory read in the same cycle. ldm_* carry the predicted node in
// the cycle after a hit. loop_hit_1 and loop_hit_2 show which entry hit.
module wldp_ldm
  import wldp_pkg::*;
#(
  parameter int unsigned NODES       = 16,
  parameter int unsigned ADDR_W      = 32,
  parameter int unsigned LOOPS       = 2,
  localparam int unsigned AW         = (NODES > 1) ? $clog2(NODES) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  // fetch request of the CPM
  input  logic              fetch_req,
  input  logic [AW-1:0]     fetch_addr,
  input  logic [AW-1:0]     fetch_from,
  // executed node
  input  logic              exec_valid,
  input  logic [AW-1:0]     exec_addr,
  input  node_type_e        exec_type,
  input  logic [ADDR_W-1:0] exec_ref,
  input  logic [AW-1:0]     exec_off,
  // prediction
  output logic              loop_hit,
  output logic [LOOPS-1:0]  loop_hit_vec,
  output node_type_e        ldm_type,
  output logic [ADDR_W-1:0] ldm_ref,
  output logic [AW-1:0]     ldm_off,
  output logic [LOOPS-1:0]  loop_valid,
  // next node of a loop whose tail is being executed (fall-through address)
  output logic              next_valid,
  output logic [AW-1:0]     next_node
);

  typedef struct packed {
    node_type_e        ntype;
    logic [ADDR_W-1:0] ref_addr;
    logic [AW-1:0]     off;
  } node_t;

  typedef struct packed {
    logic           valid;
    logic           head_valid;
    logic           next_data_valid;
    logic [AW-1:0]  tail_addr;
    logic [AW-1:0]  head_addr;
    logic [AW-1:0]  prev_addr;
    logic [AW-1:0]  next_addr;
    node_t          tail;
    node_t          head;
    node_t          next;
  } entry_t;

  entry_t           ent [LOOPS];
  logic [LOOPS-1:0] hit_tail, hit_head, hit_next, encloses, present;
  node_t            exec_node, out_q;

  assign exec_node = '{ntype: exec_type, ref_addr: exec_ref, off: exec_off};

  // ------------------------------------------------------ loop decision
  always_comb begin
    for (int e = 0; e < LOOPS; e++) begin
      hit_tail[e] = ent[e].valid && fetch_req && (fetch_addr == ent[e].tail_addr)
                    && (fetch_from == ent[e].prev_addr);
      hit_head[e] = ent[e].valid && ent[e].head_valid && fetch_req
                    && (fetch_addr == ent[e].head_addr) && (fetch_from == ent[e].tail_addr);
      hit_next[e] = ent[e].valid && ent[e].next_data_valid && fetch_req
                    && (fetch_addr == ent[e].next_addr) && (fetch_from == ent[e].tail_addr);
      encloses[e] = ent[e].valid
                    && (exec_addr >= ent[e].head_addr) && (exec_addr <= ent[e].tail_addr);
      present[e]  = ent[e].valid && (ent[e].tail_addr == exec_addr);
    end
  end

  assign loop_hit_vec = hit_tail | hit_head | hit_next;
  assign loop_hit     = |loop_hit_vec;

  // entry for a new loop: the first free one, else the first one that
  // does not enclose the new tail
  logic          alloc;
  int unsigned   alloc_idx;
  always_comb begin
    alloc     = 1'b0;
    alloc_idx = 0;
    if (exec_valid && is_backward(exec_type) && (present == '0)) begin
      for (int e = LOOPS - 1; e >= 0; e--) begin
        if (ent[e].valid && !encloses[e]) begin
          alloc     = 1'b1;
          alloc_idx = e;
        end
      end
      for (int e = LOOPS - 1; e >= 0; e--) begin
        if (!ent[e].valid) begin
          alloc     = 1'b1;
          alloc_idx = e;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int e = 0; e < LOOPS; e++) ent[e] <= '0;
      out_q <= '0;
    end else if (clear) begin
      for (int e = 0; e < LOOPS; e++) begin
        ent[e].valid           <= 1'b0;
        ent[e].head_valid      <= 1'b0;
        ent[e].next_data_valid <= 1'b0;
      end
    end else begin
      // stored node towards the CPM (lowest entry wins; both hold the same node)
      for (int e = LOOPS - 1; e >= 0; e--) begin
        if (hit_tail[e])      out_q <= ent[e].tail;
        else if (hit_head[e]) out_q <= ent[e].head;
        else if (hit_next[e]) out_q <= ent[e].next;
      end
      for (int e = 0; e < LOOPS; e++) begin
        if (ent[e].valid && !ent[e].head_valid && exec_valid
                     && (exec_addr == ent[e].head_addr)) begin
          ent[e].head       <= exec_node;
          ent[e].head_valid <= 1'b1;
        end
        if (ent[e].valid && !ent[e].next_data_valid && exec_valid
                     && (exec_addr == ent[e].next_addr)) begin
          ent[e].next            <= exec_node;
          ent[e].next_data_valid <= 1'b1;
        end
        if (alloc && (alloc_idx == e)) begin
          ent[e].valid      <= 1'b1;
          ent[e].head_valid <= 1'b0;
          ent[e].next_data_valid <= 1'b0;
          ent[e].tail_addr  <= exec_addr;
          ent[e].head_addr  <= exec_addr + exec_off;
          ent[e].prev_addr  <= exec_addr - 1'b1;
          ent[e].next_addr  <= exec_addr + 1'b1;
          ent[e].tail       <= exec_node;
        end
      end
    end
  end

  // a hit only answers a fetch, and no loop is held twice
  a_hit_fetch: assert property (@(posedge clk) disable iff (!rst_n) loop_hit |-> fetch_req);
  if (LOOPS == 2) begin : g_unique
    a_unique: assert property (@(posedge clk) disable iff (!rst_n)
      !(ent[0].valid && ent[1].valid && ent[0].tail_addr == ent[1].tail_addr));
  end

  assign ldm_type = out_q.ntype;
  assign ldm_ref  = out_q.ref_addr;
  assign ldm_off  = out_q.off;

  always_comb begin
    next_valid = 1'b0;
    next_node  = '0;
    for (int e = 0; e < LOOPS; e++) begin
      loop_valid[e] = ent[e].valid;
      if (present[e] && !next_valid) begin
        next_valid = 1'b1;
        next_node  = ent[e].next_addr;
      end
    end
  end

endmodule
