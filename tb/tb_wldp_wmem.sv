// tb_wldp_wmem -- unit test of the watchdog memory.
//
// Fills all sixteen words with random nodes, then reads random words and
// checks that each read returns the written node one cycle later, that the
// output holds while no read is requested, and that a rewrite is seen.
module tb_wldp_wmem;
  import wldp_pkg::*;
  logic        clk = 1'b0, rd_en = 1'b0, wr_en = 1'b0;
  logic [3:0]  rd_addr = '0, wr_addr = '0, wr_off = '0, rd_off;
  node_type_e  wr_type = NT_START, rd_type;
  logic [31:0] wr_ref = '0, rd_ref;
  logic [38:0] model [16];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  wldp_wmem dut (.clk, .rd_en, .rd_addr, .rd_type, .rd_ref, .rd_off,
                 .wr_en, .wr_addr, .wr_type, .wr_ref, .wr_off);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write(int a);
    @(negedge clk);
    wr_en = 1'b1; wr_addr = 4'(a);
    wr_type = node_type_e'($urandom_range(0, 7)); wr_ref = $urandom; wr_off = 4'($urandom);
    model[a] = {wr_type, wr_ref, wr_off};
    @(negedge clk);
    wr_en = 1'b0;
  endtask

  task automatic expect_word(int a, string what);
    checks++;
    if ({rd_type, rd_ref, rd_off} !== model[a]) begin
      failures++;
      $display("FAIL: %s word %0d = %h, expected %h", what, a, {rd_type, rd_ref, rd_off}, model[a]);
    end
  endtask

  initial begin
    int a;
    for (int i = 0; i < 16; i++) write(i);
    for (int i = 0; i < 300; i++) begin
      a = $urandom_range(0, 15);
      @(negedge clk); rd_en = 1'b1; rd_addr = 4'(a);
      @(negedge clk); rd_en = 1'b0; rd_addr = 4'($urandom);
      expect_word(a, "read");
      @(negedge clk);
      expect_word(a, "held");
      if (i % 50 == 0) write(a);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
