// tb_vga_framebuf: self-checking testbench of the 160x120x1 graphic memory.
//
// Checks that the memory starts cleared, writes a random image through the
// write port, reads every address back through the read port (data one clock
// after the address) against a copy kept here, checks that writes past pixel
// 19199 are ignored and read there as 0, and overwrites a random subset to
// check that writes land only at their own address.
module tb_vga_framebuf;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int WORDS = 160 * 120;

  logic        clk = 1'b0;
  logic        wr_en = 1'b0;
  logic [14:0] wr_addr = '0;
  logic        wr_data = 1'b0;
  logic [14:0] rd_addr = '0;
  logic        rd_data;
  bit          model [WORDS];

  int checks = 0;
  int failures = 0;

  vga_framebuf dut (.clk, .wr_en, .wr_addr, .wr_data, .rd_addr, .rd_data);

  always #10 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  task automatic read_all(input string phase);
    for (int a = 0; a < WORDS; a++) begin
      @(negedge clk);
      rd_addr = 15'(a);
      @(negedge clk);
      check(rd_data == model[a], $sformatf("%s: address %0d read %0b, expected %0b",
                                           phase, a, rd_data, model[a]));
    end
  endtask

  initial begin
    for (int a = 0; a < WORDS; a++) model[a] = 1'b0;
    read_all("initial");

    for (int a = 0; a < WORDS; a++) begin
      model[a] = 1'($urandom_range(0, 1));
      @(negedge clk);
      wr_en = 1'b1;
      wr_addr = 15'(a);
      wr_data = model[a];
    end
    for (int a = WORDS; a < 32768; a += 97) begin
      @(negedge clk);
      wr_en = 1'b1;
      wr_addr = 15'(a);
      wr_data = 1'b1;
    end
    @(negedge clk);
    wr_en = 1'b0;
    read_all("random");

    rd_addr = 15'(WORDS + 5);
    @(negedge clk);
    @(negedge clk);
    check(rd_data == 1'b0, "read past the end not 0");

    for (int i = 0; i < 3000; i++) begin
      int a;
      a = $urandom_range(0, WORDS - 1);
      model[a] = !model[a];
      @(negedge clk);
      wr_en = 1'b1;
      wr_addr = 15'(a);
      wr_data = model[a];
    end
    @(negedge clk);
    wr_en = 1'b0;
    read_all("overwrite");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
