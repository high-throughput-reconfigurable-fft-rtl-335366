// tb_mem_group: 8 banks written and read with different addresses per bank
// in one access; read data two cycles after the request.
module tb_mem_group;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic en, we;
  logic [7:0][8:0] addr;
  logic [7:0][31:0] wdata, rdata;
  int checks = 0, failures = 0;

  mem_group dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] pat(input int b, input int a);
    return 32'(b * 1000003 + a * 7919 + 12345);
  endfunction

  initial begin
    en = 0; we = 0; addr = '0; wdata = '0;
    for (int a = 0; a < 512; a++) begin
      @(negedge clk); en = 1; we = 1;
      for (int b = 0; b < 8; b++) begin addr[b] = 9'((a + 37 * b) % 512); wdata[b] = pat(b, (a + 37 * b) % 512); end
    end
    for (int a = 0; a < 512; a++) begin
      @(negedge clk); en = 1; we = 0;
      for (int b = 0; b < 8; b++) addr[b] = 9'((a * 5 + b) % 512);
      @(posedge clk); @(negedge clk); en = 0;
      @(posedge clk); #1;
      for (int b = 0; b < 8; b++) begin
        checks++;
        if (rdata[b] != pat(b, (a * 5 + b) % 512)) begin failures++; $display("FAIL bank %0d addr %0d", b, (a*5+b)%512); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
