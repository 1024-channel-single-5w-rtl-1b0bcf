// tb_adder_tree: 10-input tree (padded to 16) with random and extreme
// operands; checks the sum, the tag and the clog2(N)-cycle latency.
module tb_adder_tree;
  localparam int N = 10, W = 16, LAT = 4;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  logic in_valid = 0;
  logic [7:0] in_tag = '0;
  logic signed [W-1:0] in_data [N];
  logic out_valid;
  logic [7:0] out_tag;
  logic signed [W+LAT-1:0] out_sum;
  int checks = 0, failures = 0, cyc = 0;
  int exp_sum [256];
  int exp_cyc [256];

  adder_tree #(.N(N), .IN_W(W), .TAG_W(8)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (out_valid) begin
    checks++;
    if (int'(out_sum) != exp_sum[out_tag] || cyc - exp_cyc[out_tag] != LAT) begin
      failures++;
      $display("FAIL tag=%0d got=%0d exp=%0d", out_tag, out_sum, exp_sum[out_tag]);
    end
  end

  initial begin
    for (int k = 0; k < N; k++) in_data[k] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      int s;
      @(negedge clk);
      in_valid = 1;
      in_tag = 8'(t);
      s = 0;
      for (int k = 0; k < N; k++) begin
        in_data[k] = (t == 0) ? -16'sd32768 : (t == 1) ? 16'sd32767 : W'($urandom);
        s += int'(in_data[k]);
      end
      exp_sum[t] = s;
      exp_cyc[t] = cyc;
      if (t % 17 == 3) begin
        @(negedge clk);
        in_valid = 0;
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (LAT + 3) @(posedge clk);
    if (checks != 200) failures++;
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
