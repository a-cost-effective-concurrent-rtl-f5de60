// tb_wldp_top -- end-to-end test of the watchdog processor at its default
// parameters (16 watchdog-memory nodes).
//
// A behavioural processor runs a test program with a doubly nested loop, a
// subroutine call, an if/else and a forward jump. The reference program is
// derived from the same program table and loaded into the watchdog memory.
//   1. Clean runs (random idle cycles between retires): no error may be
//      reported, and the loop detection must save exactly two memory reads
//      per taken loop back-edge (tail and head come from the LDM), plus two
//      per re-entry of the inner loop. The test works this out from the
//      processor's own branch counters.
//   2. A run with a retire in every cycle: the fall-through retries of the
//      checker outrun the retire queue and a queue error must be reported.
//   3. Error injection: the processor is run to a random point and then
//      jumps to a random wrong address. The error must be reported within a
//      few cycles of the wrong instruction retiring and not before.
// Every mechanism (loop hit on entry 1 and 2, fall-through retry, call,
// return, forward jump, detected error, queue overflow) is counted and must
// occur at least once.
module tb_wldp_top;
  import wldp_pkg::*;

  localparam int unsigned NODES = 16;
  localparam int unsigned AW    = 4;
  localparam int unsigned RUNS  = 80;

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
  int n_mem = 0, n_hit1 = 0, n_hit2 = 0, n_alt = 0, n_call = 0, n_ret = 0;
  int n_fwd = 0, n_detect = 0, n_ovf = 0, n_fetch = 0;
  longint cyc = 0;

  always #5 clk = ~clk;

  wldp_top dut (
    .clk, .rst_n, .start, .retire_hit, .retiring_addr,
    .prog_we, .prog_addr, .prog_type, .prog_ref, .prog_off,
    .active, .error, .error_code, .wd_pc, .mem_read, .loop_hit_1, .loop_hit_2, .loop_valid
  );

  wldp_cpu_model #(.ADDR_W(32), .AW(AW)) cpu (.clk, .retire_hit, .retiring_addr);

  always @(posedge clk) begin
    cyc++;
    if (mem_read)   n_mem++;
    if (dut.u_cpm.fetch_req) n_fetch++;
    if (loop_hit_1) n_hit1++;
    if (loop_hit_2) n_hit2++;
    if (dut.u_cpm.do_alt) n_alt++;
    if (dut.u_cpm.exec_valid && dut.u_cpm.exec_type == NT_CALL) n_call++;
    if (dut.u_cpm.exec_valid && dut.u_cpm.exec_type == NT_RET)  n_ret++;
    if (dut.u_cpm.exec_valid && dut.u_cpm.exec_type == NT_UFB)  n_fwd++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  task automatic load_program();
    cpu.compile();
    check(cpu.n_nodes <= NODES, "program fits the watchdog memory");
    for (int i = 0; i < cpu.n_nodes; i++) begin
      @(negedge clk);
      prog_we   = 1'b1;
      prog_addr = AW'(i);
      prog_type = node_type_e'(cpu.n_type[i]);
      prog_ref  = cpu.n_ref[i];
      prog_off  = AW'(cpu.n_off[i]);
    end
    @(negedge clk);
    prog_we = 1'b0;
  endtask

  task automatic do_start();
    cpu.reset_cpu();
    for (int i = 0; i < cpu.LEN; i++) begin cpu.taken[i] = 0; cpu.exits[i] = 0; end
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
  endtask

  int unsigned max_gap;

  int fetches;

  task automatic run_clean(int unsigned gap_max, output int hits, output int mems);
    int h0, m0, f0, steps;
    do_start();
    h0 = n_hit1 + n_hit2;
    m0 = n_mem;
    f0 = n_fetch;
    steps = 0;
    while (!cpu.halted && steps < 2000) begin
      cpu.retire(cpu.next_pc(1), $urandom_range(0, gap_max));
      steps++;
    end
    repeat (12) @(negedge clk);
    hits = n_hit1 + n_hit2 - h0;
    mems = n_mem - m0;
    fetches = n_fetch - f0;
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int hits, mems, exp_hits, k, steps, x, det_cyc, inj_cyc, n_inj;
    bit early;
    retire_hit = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    cpu.build(0);
    load_program();

    // ---- 1. clean runs
    for (int r = 0; r < 4; r++) begin
      run_clean(r == 0 ? 0 : 3, hits, mems);
      // inner loop tail at 0x4A, outer loop tail at 0x4C. Both loops keep
      // their entries, so each loop saves 2 reads per taken back-edge, and
      // every re-entry of the inner loop after the first saves 2 more (its
      // tail is predicted from the first fetch on, and so is the head
      // fetched after the final, falling-through tail). From the second
      // exit of a loop on, its fall-through node comes from the LDM too.
      exp_hits = 2 * (cpu.taken['h4A - 'h40] + cpu.taken['h4C - 'h40])
               + 3 * (cpu.exits['h4A - 'h40] - 1) + (cpu.exits['h4C - 'h40] - 1);
      if (r != 0) begin
        check(!error, $sformatf("clean run %0d: no false error (code %0d)", r, error_code));
        check(hits == exp_hits, $sformatf("clean run %0d: loop hits %0d, expected %0d", r, hits, exp_hits));
        check(mems + hits == fetches,
              $sformatf("clean run %0d: %0d memory reads + %0d loop hits = %0d node fetches", r, mems, hits, fetches));
        $display("clean run %0d: %0d node reads from memory, %0d supplied by LDM (%0d without LDM)",
                 r, mems, hits, mems + hits);
      end else begin
        // ---- 2. one retire per cycle: the queue overflows
        check(error && error_code == ERR_QUEUE, "back-to-back retires overflow the retire queue");
        if (error && error_code == ERR_QUEUE) n_ovf++;
      end
    end

    // ---- 3. error injection
    n_inj = 0;
    for (int r = 0; r < RUNS; r++) begin
      do_start();
      k = $urandom_range(1, 90);
      steps = 0;
      early = 0;
      while (!cpu.halted && steps < k) begin
        cpu.retire(cpu.next_pc(1), $urandom_range(0, 2));
        if (error) early = 1;
        steps++;
      end
      if (cpu.halted || cpu.is_halt()) continue;
      n_inj++;
      do begin
        x = 'h40 + $urandom_range(0, cpu.LEN - 1);
      end while (cpu.legal_next(x) || (!cpu.is_branch() && x == cpu.next_node_addr()));
      void'(cpu.next_pc(1));          // the branch updates its state as usual
      cpu.retire(x, $urandom_range(0, 2));
      repeat (2) @(negedge clk);
      if (error) early = 1;
      check(!early, $sformatf("run %0d: no error before the wrong address", r));
      inj_cyc = int'(cyc);
      cpu.retire(cpu.next_pc(1), 0);  // the wrong instruction retires
      det_cyc = -1;
      for (int c = 0; c < 10; c++) begin
        if (error && det_cyc < 0) det_cyc = int'(cyc);
        if (!cpu.halted) cpu.retire(cpu.next_pc(1), 0);
        else @(negedge clk);
      end
      check(error && (error_code == ERR_BREAK || error_code == ERR_BRANCH),
            $sformatf("run %0d: jump to 0x%0h detected (code %0d)", r, x, error_code));
      check(det_cyc >= 0 && det_cyc - inj_cyc <= 8,
            $sformatf("run %0d: detection latency %0d cycles", r, det_cyc - inj_cyc));
      if (error) n_detect++;
    end
    $display("injected %0d errors, detected %0d", n_inj, n_detect);

    // ---- mechanisms
    $display("mechanisms: mem_read=%0d loop_hit_1=%0d loop_hit_2=%0d fallthrough_retry=%0d call=%0d ret=%0d fwd_jump=%0d detected=%0d queue_overflow=%0d",
             n_mem, n_hit1, n_hit2, n_alt, n_call, n_ret, n_fwd, n_detect, n_ovf);
    check(n_hit1 > 0, "loop entry 1 predicted a node");
    check(n_hit2 > 0, "loop entry 2 predicted a node");
    check(n_alt > 0,  "fall-through retry happened");
    check(n_call > 0 && n_ret > 0, "call and return executed");
    check(n_fwd > 0,  "forward jump executed");
    check(n_detect > 0 && n_detect == n_inj, "every injected error detected");
    check(n_ovf > 0,  "queue overflow reported");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
