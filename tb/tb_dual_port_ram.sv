// tb_dual_port_ram: writes a pattern into the two-port RAM, reads it back
// with one cycle of latency, and checks a simultaneous write and read of the
// same address returns the old word.
module tb_dual_port_ram;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic wr_en = 0, rd_en = 0;
  logic [5:0] wr_addr, rd_addr;
  logic [7:0] data_in, data_out;
  dual_port_ram #(.DEPTH(64), .WIDTH(8)) dut (.*);
  initial begin
    @(posedge clk);
    for (int a = 0; a < 64; a++) begin
      wr_en <= 1; wr_addr <= 6'(a); data_in <= 8'(a * 7 + 1);
      @(posedge clk);
    end
    wr_en <= 0;
    for (int a = 0; a < 64; a++) begin
      rd_en <= 1; rd_addr <= 6'(63 - a);
      @(posedge clk);
      rd_en <= 0;
      @(negedge clk);
      check(data_out == 8'((63 - a) * 7 + 1), "read back");
      @(posedge clk);
    end
    // read and write the same address in one cycle: old data
    wr_en <= 1; wr_addr <= 6'd5; data_in <= 8'hAA; rd_en <= 1; rd_addr <= 6'd5;
    @(posedge clk);
    wr_en <= 0; rd_en <= 0;
    @(negedge clk);
    check(data_out == 8'(5 * 7 + 1), "read-during-write returns old word");
    rd_en <= 1; @(posedge clk); rd_en <= 0; @(negedge clk);
    check(data_out == 8'hAA, "new word after the write");
    // rd_en low holds the output
    rd_addr <= 6'd0; @(posedge clk); @(negedge clk);
    check(data_out == 8'hAA, "output held without rd_en");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
