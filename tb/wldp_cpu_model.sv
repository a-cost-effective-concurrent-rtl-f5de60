// wldp_cpu_model -- behavioural stand-in for the monitored main processor
// (testbench only, not synthesizable).
//
// Holds a small test program as a table of instruction kinds over the word
// addresses BASE .. BASE+LEN-1, walks it like a processor would and drives
// retire_hit / retiring_addr, one retired instruction per call of retire().
// Conditional branches are taken `trip` times in a row, then fall through
// once and start over, so loops run trip+1 times per entry and a forward
// branch with trip 1 alternates between taken and not taken. A "break"
// branch (K_BRK) does the opposite: it falls through `trip` times, then is
// taken once.
//
// compile() derives the watchdog reference program from the same table, the
// way a tool would: a node for the entry point, for every branch, call and
// return instruction, and for every other basic block leader (branch targets,
// fall-through successors of conditional branches, return points after
// calls). Nodes are ordered by address; offsets are target index minus own
// index modulo 2**AW.
//
// The model also counts, per branch, how often it was taken and how often
// it fell through, which the testbenches use to work out the expected number of loop
// predictions on their own.
module wldp_cpu_model #(
  parameter int unsigned ADDR_W = 32,
  parameter int unsigned AW     = 4,
  parameter int unsigned LEN    = 64,
  parameter logic [31:0] BASE   = 32'h40
) (
  input  logic              clk,
  output logic              retire_hit,
  output logic [ADDR_W-1:0] retiring_addr
);

  typedef enum int {K_PLAIN, K_CBR, K_BRK, K_JMP, K_CALL, K_RET, K_HALT} kind_e;

  kind_e       kind [LEN];
  int unsigned tgt  [LEN];
  int unsigned trip [LEN];
  int unsigned cnt  [LEN];
  int unsigned taken[LEN];   // taken count of each branch since build
  int unsigned exits[LEN];   // fall-through count of each conditional branch

  // reference program
  int unsigned n_nodes;
  logic [2:0]  n_type [LEN];
  int unsigned n_ref  [LEN];
  int unsigned n_off  [LEN];
  int unsigned n_idx  [LEN]; // node index of an address, or 999

  // processor state
  int unsigned pc;
  int unsigned stk [16];
  int unsigned sp;
  bit          halted;

  initial begin
    retire_hit    = 1'b0;
    retiring_addr = '0;
  end

  function automatic void set(int unsigned a, kind_e k, int unsigned t = 0, int unsigned n = 0);
    kind[a - BASE] = k;
    tgt [a - BASE] = t;
    trip[a - BASE] = n;
  endfunction

  // sel 0: nested loop, call, if/else, forward jump (15 nodes)
  // sel 1: if/else, triple nested loop, an endless loop left by a break
  //        (UBB), a subroutine with a one-node loop, a forward jump (23 nodes)
  // sel 2: one loop of 100 iterations (4 nodes)
  // sel 3: two overlapping loops, the second of 27 iterations (6 nodes)
  // sel 4: a far call and 47 loops in sequence (100 nodes, needs LEN 256)
  function automatic void build(int sel);
    for (int i = 0; i < LEN; i++) begin
      kind[i] = K_PLAIN; tgt[i] = 0; trip[i] = 0; cnt[i] = 0; taken[i] = 0; exits[i] = 0;
    end
    if (sel == 0) begin
      set('h43, K_CALL, 'h60);
      set('h45, K_CBR,  'h48, 1);      // if
      set('h4A, K_CBR,  'h48, 4);      // inner loop tail
      set('h4C, K_CBR,  'h42, 3);      // outer loop tail
      set('h4E, K_JMP,  'h50);
      set('h51, K_HALT);
      set('h62, K_RET);
    end else if (sel == 4) begin
      // a far call, then 47 loops of 3 iterations in a row (100 nodes)
      set('h41, K_CALL, 'hF0);
      for (int j = 0; j < 47; j++) set('h45 + 3 * j, K_CBR, 'h43 + 3 * j, 2);
      set('hD0, K_HALT);
      set('hF1, K_RET);
    end else if (sel == 3) begin
      set('h43, K_CBR,  'h41, 2);      // overlapped loops: [0x41, 0x43]
      set('h44, K_CBR,  'h42, 26);     //               and [0x42, 0x44]
      set('h45, K_HALT);
    end else if (sel == 2) begin
      set('h43, K_CBR,  'h41, 99);     // single loop, 100 iterations
      set('h44, K_HALT);
    end else begin
      set('h42, K_CBR,  'h44, 1);      // if
      set('h46, K_CBR,  'h45, 3);      // triple: innermost tail
      set('h48, K_CBR,  'h45, 2);      // triple: middle tail
      set('h4A, K_CBR,  'h44, 2);      // triple: outer tail
      set('h4C, K_CALL, 'h68);
      set('h4F, K_BRK,  'h53, 4);      // break out of the endless loop
      set('h51, K_JMP,  'h4E);         // endless loop tail (UBB)
      set('h53, K_JMP,  'h56);
      set('h56, K_HALT);
      set('h69, K_CBR,  'h69, 5);      // one-node loop inside the subroutine
      set('h6B, K_RET);
    end
  endfunction

  function automatic logic [2:0] node_type_of(int unsigned a, bit entry);
    case (kind[a - BASE])
      K_CBR, K_BRK: return (tgt[a - BASE] <= a) ? 3'b100 : 3'b101;
      K_JMP:   return (tgt[a - BASE] <= a) ? 3'b010 : 3'b011;
      K_CALL:  return 3'b110;
      K_RET:   return 3'b111;
      default: return entry ? 3'b000 : 3'b001;
    endcase
  endfunction

  function automatic void compile();
    bit node [LEN];
    for (int i = 0; i < LEN; i++) node[i] = 0;
    node[0] = 1;
    for (int i = 0; i < LEN; i++) begin
      case (kind[i])
        K_CBR, K_BRK: begin node[i] = 1; node[tgt[i] - BASE] = 1; node[i + 1] = 1; end
        K_JMP:  begin node[i] = 1; node[tgt[i] - BASE] = 1; end
        K_CALL: begin node[i] = 1; node[tgt[i] - BASE] = 1; node[i + 1] = 1; end
        K_RET:  node[i] = 1;
        default: ;
      endcase
    end
    n_nodes = 0;
    for (int i = 0; i < LEN; i++) begin
      n_idx[i] = 999;
      if (node[i]) begin
        n_idx[i] = n_nodes;
        n_nodes++;
      end
    end
    for (int i = 0; i < LEN; i++) begin
      if (node[i]) begin
        n_type[n_idx[i]] = node_type_of(BASE + i, i == 0);
        n_ref [n_idx[i]] = BASE + i;
        n_off [n_idx[i]] = 0;
        if (kind[i] inside {K_CBR, K_BRK, K_JMP, K_CALL})
          n_off[n_idx[i]] = (n_idx[tgt[i] - BASE] - n_idx[i]) & ((1 << AW) - 1);
      end
    end
  endfunction

  function automatic void reset_cpu();
    pc = BASE; sp = 0; halted = 0;
    for (int i = 0; i < LEN; i++) cnt[i] = 0;
  endfunction

  // successor of the instruction at pc under correct execution
  function automatic int unsigned next_pc(bit update);
    int unsigned i = pc - BASE;
    if (i >= LEN) return pc + 1;
    case (kind[i])
      K_CBR: begin
        if (cnt[i] < trip[i]) begin
          if (update) begin cnt[i]++; taken[i]++; end
          return tgt[i];
        end
        if (update) begin cnt[i] = 0; exits[i]++; end
        return pc + 1;
      end
      K_BRK: begin
        if (cnt[i] >= trip[i]) begin
          if (update) begin cnt[i] = 0; taken[i]++; end
          return tgt[i];
        end
        if (update) cnt[i]++;
        return pc + 1;
      end
      K_JMP:  begin
        if (update) taken[i]++;
        return tgt[i];
      end
      K_CALL: begin
        if (update) begin stk[sp] = pc + 1; sp++; end
        return tgt[i];
      end
      K_RET: begin
        if (sp == 0) return pc + 1;
        if (update) sp--;
        return stk[update ? sp : sp - 1];
      end
      default: return pc + 1;
    endcase
  endfunction

  function automatic bit is_halt();
    int unsigned i = pc - BASE;
    return (i < LEN) && (kind[i] == K_HALT);
  endfunction

  function automatic bit is_branch();
    int unsigned i = pc - BASE;
    return (i < LEN) && (kind[i] inside {K_CBR, K_BRK, K_JMP, K_CALL, K_RET});
  endfunction

  // first node address above pc (the checkpoint a skip would land on)
  function automatic int unsigned next_node_addr();
    for (int unsigned a = pc + 1; a < BASE + LEN; a++)
      if (n_idx[a - BASE] != 999) return a;
    return 0;
  endfunction

  // other successors a branch at pc could legally have (both directions
  // of a conditional branch)
  function automatic bit legal_next(int unsigned x);
    int unsigned i = pc - BASE;
    if (x == pc + 1 && (i >= LEN || kind[i] != K_JMP && kind[i] != K_CALL && kind[i] != K_RET))
      return 1;
    if (i < LEN && kind[i] inside {K_CBR, K_BRK, K_JMP, K_CALL} && x == tgt[i]) return 1;
    if (i < LEN && kind[i] == K_RET && sp > 0 && x == stk[sp - 1]) return 1;
    return 0;
  endfunction

  // retire the instruction at pc (call at a falling edge), then stay idle
  // for `gap` cycles and continue at `nxt`
  task automatic retire(int unsigned nxt, int unsigned gap);
    retire_hit    = 1'b1;
    retiring_addr = ADDR_W'(pc);
    @(negedge clk);
    retire_hit    = 1'b0;
    repeat (gap) @(negedge clk);
    if (is_halt()) halted = 1;
    pc = nxt;
  endtask

endmodule
