// tb_wldp_loops -- memory reads saved by loop prediction, at the default
// parameters.
//
// Two loop workloads are run clean through the watchdog:
//   * a single loop of 100 iterations;
//   * a doubly nested loop, 15 outer iterations of which each runs the
//     inner loop 4 times (60 inner iterations), with a call and an if/else
//     in the outer body;
//   * two overlapping loops, [0x41, 0x43] and [0x42, 0x44], the second
//     running 27 times and re-entering the first each time.
// For every loop the test counts the fetches of its tail and of its head
// (the head fetch right after the tail) and how many of them the LDM
// supplied. It checks the saved reads against the count worked out from the
// processor's branch counters: 2 per taken back-edge, plus 2 for every
// re-entry of a loop whose entry was kept. No error may be reported.
module tb_wldp_loops;
  import wldp_pkg::*;

  localparam int unsigned AW = 4;

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
  int tail_idx [2], head_idx [2];
  int n_fetch [2], n_saved [2];

  always #5 clk = ~clk;

  wldp_top dut (
    .clk, .rst_n, .start, .retire_hit, .retiring_addr,
    .prog_we, .prog_addr, .prog_type, .prog_ref, .prog_off,
    .active, .error, .error_code, .wd_pc, .mem_read, .loop_hit_1, .loop_hit_2, .loop_valid
  );

  wldp_cpu_model #(.ADDR_W(32), .AW(AW)) cpu (.clk, .retire_hit, .retiring_addr);

  // tail fetches and head-after-tail fetches of the loops under watch
  always @(posedge clk) begin
    for (int l = 0; l < 2; l++) begin
      if (dut.u_cpm.fetch_req && !start && tail_idx[l] >= 0
          && ((32'(dut.u_cpm.fetch_addr) == tail_idx[l])
              || (32'(dut.u_cpm.fetch_addr) == head_idx[l] && 32'(dut.u_cpm.fetch_from) == tail_idx[l]))) begin
        n_fetch[l]++;
        if (loop_hit_1 || loop_hit_2) n_saved[l]++;
      end
    end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  task automatic run(string name, int ntails, int t0, int t1);
    int tails [2];
    int exp;
    tails[0] = t0; tails[1] = t1;
    cpu.compile();
    check(cpu.n_nodes <= 16, "program fits");
    for (int i = 0; i < cpu.n_nodes; i++) begin
      @(negedge clk);
      prog_we = 1'b1; prog_addr = AW'(i); prog_type = node_type_e'(cpu.n_type[i]);
      prog_ref = cpu.n_ref[i]; prog_off = AW'(cpu.n_off[i]);
    end
    @(negedge clk);
    prog_we = 1'b0;
    for (int l = 0; l < 2; l++) begin
      n_fetch[l] = 0; n_saved[l] = 0; tail_idx[l] = -1; head_idx[l] = -1;
      if (l < ntails) begin
        tail_idx[l] = int'(cpu.n_idx[tails[l] - 'h40]);
        head_idx[l] = int'(cpu.n_idx[cpu.tgt[tails[l] - 'h40] - 'h40]);
      end
    end
    cpu.reset_cpu();
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    while (!cpu.halted) cpu.retire(cpu.next_pc(1), $urandom_range(0, 2));
    repeat (12) @(negedge clk);
    check(!error, $sformatf("%s: no error (code %0d)", name, error_code));
    for (int l = 0; l < ntails; l++) begin
      int a = tails[l] - 'h40;
      exp = 2 * int'(cpu.taken[a]) + 2 * (int'(cpu.exits[a]) - 1);
      $display("%s, loop %0d: %0d iterations, %0d tail+head fetches, %0d from the LDM (%0d.%0d%%)",
               name, l, cpu.taken[a] + cpu.exits[a], n_fetch[l], n_saved[l],
               1000 * n_saved[l] / n_fetch[l] / 10, 1000 * n_saved[l] / n_fetch[l] % 10);
      check(n_saved[l] == exp, $sformatf("%s loop %0d: saved %0d, expected %0d", name, l, n_saved[l], exp));
      check(n_saved[l] == n_fetch[l] - 2,
            $sformatf("%s loop %0d: only the first tail and head read from memory", name, l));
      check(n_fetch[l] == 2 * int'(cpu.taken[a] + cpu.exits[a]),
            $sformatf("%s loop %0d: two tail/head fetches per iteration", name, l));
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    retire_hit = 1'b0;
    for (int l = 0; l < 2; l++) begin tail_idx[l] = -1; head_idx[l] = -1; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    cpu.build(2);
    run("single loop", 1, 'h43, 0);
    cpu.build(0);
    cpu.trip['h0A] = 3;    // inner loop: 4 iterations per entry
    cpu.trip['h0C] = 14;   // outer loop: 15 iterations
    run("doubly nested (inner, outer)", 2, 'h4A, 'h4C);
    cpu.build(3);
    run("overlapped", 2, 'h43, 'h44);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
