// tb_wldp_rpm -- unit test of the retiring address processing module.
//
// Drives random retire streams (mostly sequential, sometimes jumping, with
// random idle cycles and restarts) and checks each event one cycle later
// against a reference: the address is passed on, and the break flag is set
// exactly when the address is not the previous one plus one or when it is
// the first retire after a restart.
module tb_wldp_rpm;
  logic        clk = 1'b0, rst_n = 1'b0, restart = 1'b0, retire_hit = 1'b0;
  logic [31:0] retiring_addr = '0;
  logic        ev_valid, ev_break;
  logic [31:0] ev_addr;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  wldp_rpm dut (.clk, .rst_n, .restart, .retire_hit, .retiring_addr, .ev_valid, .ev_addr, .ev_break);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] prev, a;
    bit          have, exp_brk;
    int          n_brk;
    n_brk = 0;
    have = 0; prev = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 1500; i++) begin
      @(negedge clk);
      restart = ($urandom_range(0, 99) == 0);
      retire_hit = ($urandom_range(0, 3) != 0) && !restart;
      a = ($urandom_range(0, 5) == 0) ? $urandom : prev + 1;
      retiring_addr = a;
      if (restart) have = 0;
      exp_brk = !have || (a != prev + 1);
      @(negedge clk);
      checks++;
      if (ev_valid !== retire_hit) begin
        failures++; $display("FAIL: ev_valid %0b expected %0b", ev_valid, retire_hit);
      end
      if (retire_hit) begin
        checks++;
        if (ev_addr !== a || ev_break !== exp_brk) begin
          failures++;
          $display("FAIL: addr %h break %0b, expected %h %0b", ev_addr, ev_break, a, exp_brk);
        end
        if (exp_brk) n_brk++;
        prev = a; have = 1;
      end
      retire_hit = 1'b0;
      restart = 1'b0;
    end
    checks++;
    if (n_brk == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
