// tb_hann_apodizer: every channel of a 4 x 8 probe with random samples,
// compared with Hanning weights computed from $cos; checks the 2-cycle latency.
module tb_hann_apodizer;
  import bf_model_pkg::*;
  localparam int NX = 4, NY = 8, NCH = NX * NY;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  logic in_valid = 0;
  logic [4:0] in_ch = '0;
  logic [5:0] in_addr = '0;
  logic signed [15:0] in_data = '0;
  logic out_valid;
  logic [4:0] out_ch;
  logic [5:0] out_addr;
  logic signed [15:0] out_data;
  int checks = 0, failures = 0, cyc = 0;
  int exp_q[$];
  int cyc_q[$];

  hann_apodizer #(.N_X(NX), .N_Y(NY), .ADDR_W(6)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (out_valid) begin
    int e, c;
    e = exp_q.pop_front();
    c = cyc_q.pop_front();
    checks++;
    if (int'(out_data) != e || cyc - c != 2) begin
      failures++;
      $display("FAIL ch=%0d got=%0d exp=%0d lat=%0d", out_ch, out_data, e, cyc - c);
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 400; k++) begin
      @(negedge clk);
      in_valid = 1;
      in_ch    = 5'(k % NCH);
      in_addr  = 6'(k);
      in_data  = (k < NCH) ? 16'sd32767 : (k < 2 * NCH) ? -16'sd32768 : 16'($urandom);
      exp_q.push_back(apodize(int'(in_data), k % NCH, NX, NY));
      cyc_q.push_back(cyc);
    end
    @(negedge clk);
    in_valid = 0;
    repeat (5) @(posedge clk);
    if (checks != 400) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
