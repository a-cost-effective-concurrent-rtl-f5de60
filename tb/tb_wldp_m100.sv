// tb_wldp_m100 -- a 100-node reference program on a 128-word watchdog
// memory (7-bit offsets).
//
// The program calls a subroutine placed far behind the main code (a 97-node
// forward offset), then runs 47 loops of three iterations one after the
// other, so that loop entries are replaced 45 times. Checks: no false error
// on a clean run; every loop has all but its first tail and first head
// fetch supplied by the LDM (2 per taken back-edge); and 150 random wrong
// jumps are all detected.
module tb_wldp_m100;
  import wldp_pkg::*;

  localparam int unsigned NODES = 128;
  localparam int unsigned AW    = 7;

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

  int checks = 0, failures = 0, n_hit = 0, n_mem = 0;

  always #5 clk = ~clk;

  wldp_top #(.NODES(NODES)) dut (
    .clk, .rst_n, .start, .retire_hit, .retiring_addr,
    .prog_we, .prog_addr, .prog_type, .prog_ref, .prog_off,
    .active, .error, .error_code, .wd_pc, .mem_read, .loop_hit_1, .loop_hit_2, .loop_valid
  );

  wldp_cpu_model #(.ADDR_W(32), .AW(AW), .LEN(256)) cpu (.clk, .retire_hit, .retiring_addr);

  always @(posedge clk) begin
    if (loop_hit_1 || loop_hit_2) n_hit++;
    if (mem_read) n_mem++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  task automatic do_start();
    cpu.reset_cpu();
    for (int i = 0; i < 256; i++) begin cpu.taken[i] = 0; cpu.exits[i] = 0; end
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp, h0, m0, k, steps, x, n_inj, n_det;
    bit early;
    retire_hit = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    cpu.build(4);
    cpu.compile();
    check(cpu.n_nodes == 100, $sformatf("program has %0d nodes", cpu.n_nodes));
    check(cpu.n_off[1] == 97, $sformatf("call offset %0d", cpu.n_off[1]));
    for (int i = 0; i < cpu.n_nodes; i++) begin
      @(negedge clk);
      prog_we = 1'b1; prog_addr = AW'(i); prog_type = node_type_e'(cpu.n_type[i]);
      prog_ref = cpu.n_ref[i]; prog_off = AW'(cpu.n_off[i]);
    end
    @(negedge clk);
    prog_we = 1'b0;

    do_start();
    h0 = n_hit; m0 = n_mem;
    while (!cpu.halted) cpu.retire(cpu.next_pc(1), $urandom_range(0, 1));
    repeat (12) @(negedge clk);
    check(!error, $sformatf("clean run: no error (code %0d)", error_code));
    exp = 0;
    for (int i = 0; i < 256; i++) exp += 2 * int'(cpu.taken[i]);
    $display("clean run: %0d reads from memory, %0d nodes from the LDM (expected %0d)",
             n_mem - m0, n_hit - h0, exp);
    check(n_hit - h0 == exp, "two reads saved per taken back-edge");

    n_inj = 0; n_det = 0;
    for (int r = 0; r < 150; r++) begin
      do_start();
      k = $urandom_range(0, 420);
      steps = 0;
      early = 0;
      while (!cpu.halted && steps < k) begin
        cpu.retire(cpu.next_pc(1), $urandom_range(0, 1));
        if (error) early = 1;
        steps++;
      end
      if (cpu.halted || cpu.is_halt()) continue;
      do begin
        x = 'h40 + $urandom_range(0, 256 - 1);
      end while (cpu.legal_next(x) || (!cpu.is_branch() && x == cpu.next_node_addr()));
      n_inj++;
      void'(cpu.next_pc(1));
      cpu.retire(x, 0);
      if (error) early = 1;
      check(!early, $sformatf("run %0d: no error before the wrong address", r));
      for (int c = 0; c < 10; c++) begin
        if (!cpu.halted) cpu.retire(cpu.next_pc(1), 0);
        else @(negedge clk);
      end
      if (error) n_det++;
      else $display("missed: jump to 0x%0h", x);
    end
    $display("%0d wrong jumps injected, %0d detected", n_inj, n_det);
    check(n_inj > 100 && n_det == n_inj, "every wrong jump detected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
