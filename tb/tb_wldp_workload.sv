// tb_wldp_workload -- error coverage and loop prediction on a richer
// program, with a 32-node watchdog memory.
//
// The program has an if/else, a triple nested loop, a subroutine with a
// one-node loop, and an endless loop (unconditional backward branch) that is
// left by a conditional forward "break", and a forward jump. 23 nodes.
//   * Loop prediction: the outer and middle loops of the triple nest must
//     have every tail fetch after the very first one supplied by the LDM. The
//     innermost loop finds both entries busy part of the time, so only some
//     of its tail fetches may be predicted. The endless loop and the
//     subroutine loop must be predicted too. Memory reads with and without
//     the LDM are reported.
//   * Error coverage: many runs, each jumping once to a random wrong address
//     at a random point. Injections are binned by the type of the node that
//     guards the point (the branch node itself, or the node the watchdog
//     expects next). They are also binned by the three error classes of
//     the evaluation: a wrong address that is a node's own address, at a
//     non-branching node (class 1) or at a branching node (class 2), and a
//     wrong address inside a node's block or outside the program (class 3).
//     Every bin must be detected in full, and a clean run must raise no
//     error.
module tb_wldp_workload;
  import wldp_pkg::*;

  localparam int unsigned NODES = 32;
  localparam int unsigned AW    = 5;
  localparam int unsigned RUNS  = 600;

  logic              clk = 1'b0;
  logic              rst_n = 1'b0;
  logic              start = 1'b0;
  logic              retire_hit;
  logic [31:0]       retiring_addr;
  logic              prog_we = 1'b0;
  logic [AW-1:0]     prog_addr = '0;
  node_type_e        prog_type = NT_START;
  logic [31:0]       prog_ref = '0;
  logic [AW-1:0]     prog_off = '0;
  logic              active, error, mem_read, loop_hit_1, loop_hit_2;
  err_e              error_code;
  logic [AW-1:0]     wd_pc;
  logic [1:0]        loop_valid;

  int checks = 0, failures = 0;
  int n_mem = 0, n_hit = 0, n_fetch = 0;
  int tail_hits [64];
  int all_hits [64];
  int inj [8], det [8];
  int cls_inj [4], cls_det [4];

  always #5 clk = ~clk;

  wldp_top #(.NODES(NODES)) dut (
    .clk, .rst_n, .start, .retire_hit, .retiring_addr,
    .prog_we, .prog_addr, .prog_type, .prog_ref, .prog_off,
    .active, .error, .error_code, .wd_pc, .mem_read, .loop_hit_1, .loop_hit_2, .loop_valid
  );

  wldp_cpu_model #(.ADDR_W(32), .AW(AW)) cpu (.clk, .retire_hit, .retiring_addr);

  always @(posedge clk) begin
    if (mem_read) n_mem++;
    if (dut.u_cpm.fetch_req) n_fetch++;
    if (loop_hit_1 || loop_hit_2) begin
      n_hit++;
      for (int a = 0; a < 64; a++)
        if (cpu.n_idx[a] == 32'(dut.u_cpm.fetch_addr)) all_hits[a]++;
      for (int a = 0; a < 64; a++)
        if (cpu.n_idx[a] == 32'(dut.u_cpm.fetch_addr) && cpu.n_idx[a] != 999
            && dut.u_cpm.fetch_from != dut.u_cpm.fetch_addr) tail_hits[a]++;
    end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  task automatic do_start();
    cpu.reset_cpu();
    for (int i = 0; i < cpu.LEN; i++) begin cpu.taken[i] = 0; cpu.exits[i] = 0; end
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
  endtask

  // node type guarding the current point of the program
  // error class of a wrong address x at a point guarded by node type g
  function automatic int class_of(int g, int x);
    if (cpu.n_idx[x - 'h40] == 999) return 3;
    return (g <= 1) ? 1 : 2;
  endfunction

  function automatic int guard_type();
    int unsigned a;
    if (cpu.is_branch()) return int'(cpu.n_type[cpu.n_idx[cpu.pc - 'h40]]);
    a = cpu.next_node_addr();
    return int'(cpu.n_type[cpu.n_idx[a - 'h40]]);
  endfunction

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int dbg_pc;
    int k, steps, x, g, cls, m0, f0, h0, tot_inj, tot_det;
    bit early;
    retire_hit = 1'b0;
    for (int i = 0; i < 8; i++) begin inj[i] = 0; det[i] = 0; end
    for (int i = 0; i < 4; i++) begin cls_inj[i] = 0; cls_det[i] = 0; end
    for (int i = 0; i < 64; i++) tail_hits[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    cpu.build(1);
    cpu.compile();
    check(cpu.n_nodes == 23, $sformatf("program has %0d nodes", cpu.n_nodes));
    for (int i = 0; i < cpu.n_nodes; i++) begin
      @(negedge clk);
      prog_we = 1'b1; prog_addr = AW'(i); prog_type = node_type_e'(cpu.n_type[i]);
      prog_ref = cpu.n_ref[i]; prog_off = AW'(cpu.n_off[i]);
    end
    @(negedge clk);
    prog_we = 1'b0;

    // ---- clean run with loop statistics
    do_start();
    m0 = n_mem; f0 = n_fetch; h0 = n_hit;
    for (int i = 0; i < 64; i++) begin tail_hits[i] = 0; all_hits[i] = 0; end
    steps = 0;
    while (!cpu.halted && steps < 5000) begin
      cpu.retire(cpu.next_pc(1), $urandom_range(0, 2));
      steps++;
    end
    repeat (12) @(negedge clk);
    check(!error, $sformatf("clean run: no error (code %0d)", error_code));
    $display("clean run: %0d retires, %0d node fetches, %0d from memory, %0d from the LDM (%0d%% of reads saved)",
             steps, n_fetch - f0, n_mem - m0, n_hit - h0, 100 * (n_hit - h0) / (n_fetch - f0));
    $display("tail 0x4A (triple outer):  taken %0d, predicted %0d", cpu.taken['h0A], tail_hits['h0A]);
    $display("tail 0x48 (triple middle): taken %0d, predicted %0d", cpu.taken['h08], tail_hits['h08]);
    $display("tail 0x46 (triple inner):  taken %0d, predicted %0d", cpu.taken['h06], tail_hits['h06]);
    $display("tail 0x51 (endless loop):  taken %0d, predicted %0d", cpu.taken['h11], tail_hits['h11]);
    $display("tail 0x69 (subroutine):    taken %0d, predicted %0d", cpu.taken['h29], all_hits['h29]);
    check(tail_hits['h0A] == cpu.taken['h0A], "outer loop of the triple nest fully predicted");
    check(tail_hits['h08] == cpu.taken['h08] + cpu.exits['h08] - 1,
          "middle loop of the triple nest fully predicted");
    check(tail_hits['h06] > 0 && tail_hits['h06] < cpu.taken['h06],
          "innermost loop predicted only while an entry is free");
    check(tail_hits['h11] == cpu.taken['h11] - 1, "endless loop tail predicted after the first pass");
    check(all_hits['h29] > 0, "one-node loop in the subroutine predicted");
    check(n_hit - h0 > 0 && n_mem - m0 + n_hit - h0 == n_fetch - f0, "memory reads + loop hits = fetches");

    // ---- error injection
    for (int r = 0; r < RUNS; r++) begin
      int want;
      bit found;
      want = r % 8;            // node type this run tries to hit
      do_start();
      k = $urandom_range(1, 110);
      steps = 0;
      early = 0;
      found = (want == 0);     // type 000: the very first retire is wrong
      while (!found && !cpu.halted && steps < 400) begin
        cpu.retire(cpu.next_pc(1), $urandom_range(0, 2));
        if (error) early = 1;
        steps++;
        if (!cpu.halted && !cpu.is_halt() && steps >= k && guard_type() == want && $urandom_range(0, 2) == 0) found = 1;
      end
      if (!found) continue;
      do begin
        x = 'h40 + $urandom_range(0, cpu.LEN - 1);
      end while (cpu.legal_next(x) || (!cpu.is_branch() && x == cpu.next_node_addr())
                 || (want == 0 && x == 'h40));
      if (want == 0) begin
        // enter the program at a wrong address
        g = 0;
        inj[g]++;
        cpu.pc = x;
        for (int c = 0; c < 10; c++) if (!cpu.halted) cpu.retire(cpu.next_pc(1), 0);
        repeat (6) @(negedge clk);
        if (error) det[g]++;
        cls = class_of(g, x);
        cls_inj[cls]++;
        if (error) cls_det[cls]++;
        continue;
      end
      g = guard_type();
      dbg_pc = cpu.pc;
      inj[g]++;
      void'(cpu.next_pc(1));
      cpu.retire(x, $urandom_range(0, 2));
      if (error) early = 1;
      check(!early, $sformatf("run %0d: no error before the wrong address", r));
      for (int c = 0; c < 10; c++) begin
        if (!cpu.halted) cpu.retire(cpu.next_pc(1), 0);
        else @(negedge clk);
      end
      if (error) det[g]++; else $display("MISS type %0d pc %h x %h", g, dbg_pc, x);
      cls = class_of(g, x);
      cls_inj[cls]++;
      if (error) cls_det[cls]++;
    end
    tot_inj = 0; tot_det = 0;
    for (int t = 0; t < 8; t++) begin
      $display("node type %03b: %0d errors injected, %0d detected", 3'(t), inj[t], det[t]);
      check(det[t] == inj[t], $sformatf("coverage for node type %03b", 3'(t)));
      tot_inj += inj[t]; tot_det += det[t];
    end
    $display("total: %0d injected, %0d detected", tot_inj, tot_det);
    check(tot_inj > RUNS / 2, "enough injections");
    for (int t = 0; t < 8; t++) check(inj[t] > 0, $sformatf("errors injected at node type %03b", 3'(t)));
    for (int c = 1; c <= 3; c++) begin
      $display("error class %0d: %0d injected, %0d detected", c, cls_inj[c], cls_det[c]);
      check(cls_inj[c] > 0 && cls_det[c] == cls_inj[c], $sformatf("coverage for error class %0d", c));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
