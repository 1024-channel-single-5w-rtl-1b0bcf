// tb_echo_bank: fills both channels of a bank, then reads them on both ports
// in the same cycles; checks data and the one-cycle read latency.
module tb_echo_bank;
  localparam int D = 32;
  logic clk = 0;
  logic a_we = 0, a_ch = 0;
  logic [4:0] a_addr = '0, b_addr = '0;
  logic [15:0] a_wdata = '0, a_rdata, b_rdata;
  logic [15:0] ref0 [D], ref1 [D];
  int checks = 0, failures = 0;

  echo_bank #(.DEPTH(D), .W(16)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    for (int c = 0; c < 2; c++)
      for (int k = 0; k < D; k++) begin
        @(negedge clk);
        a_we = 1;
        a_ch = 1'(c);
        a_addr = 5'(k);
        a_wdata = 16'($urandom);
        if (c == 0) ref0[k] = a_wdata; else ref1[k] = a_wdata;
      end
    @(negedge clk);
    a_we = 0;
    a_ch = 0;
    for (int k = 0; k < 100; k++) begin
      logic [4:0] ra, rb;
      ra = 5'($urandom);
      rb = 5'($urandom);
      a_addr = ra;
      b_addr = rb;
      @(posedge clk);
      #1;
      checks += 2;
      if (a_rdata != ref0[ra]) begin failures++; $display("FAIL A %0d", ra); end
      if (b_rdata != ref1[rb]) begin failures++; $display("FAIL B %0d", rb); end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
