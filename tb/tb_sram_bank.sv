// tb_sram_bank: random writes and reads against a model array; data appears
// two cycles after the read request (array read register + output register).
module tb_sram_bank;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic en, we;
  logic [8:0] addr;
  logic [31:0] wdata, rdata;
  logic [31:0] model [512];
  int checks = 0, failures = 0;

  sram_bank dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] exp_q [$];
    logic        rd_q  [$];
    en = 0; we = 0; addr = 0; wdata = 0;
    for (int i = 0; i < 512; i++) begin
      @(negedge clk); en = 1; we = 1; addr = 9'(i); wdata = $urandom; model[i] = wdata;
    end
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      // check the read issued two cycles ago
      if (rd_q.size() == 2) begin
        logic r; logic [31:0] e;
        r = rd_q.pop_front(); e = exp_q.pop_front();
        if (r) begin checks++; if (rdata != e) begin failures++; $display("FAIL rdata %h want %h", rdata, e); end end
      end
      en = ($urandom_range(3, 0) != 0);
      we = en && ($urandom_range(1, 0) == 0);
      addr = 9'($urandom);
      wdata = $urandom;
      rd_q.push_back(en && !we);
      exp_q.push_back(model[addr]);
      if (en && we) model[addr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
