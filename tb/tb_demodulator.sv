// tb_demodulator: 8 nappes of 3 x 2 lines of random RF voxels, with gaps;
// each output is compared with sum_m H[m] |x(k-m)| / 16 over the same line,
// taps before nappe 0 being zero; checks the 2-cycle latency and that the
// five-slot circular buffer wraps.
module tb_demodulator;
  import us_pkg::*;
  import bf_model_pkg::*;
  localparam int NT = 3, NP = 2, NL = 6, NN = 8, W = 20;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  logic in_valid = 0;
  voxel_tag_t in_tag = '0;
  logic signed [W-1:0] in_data = '0;
  logic out_valid, out_partial;
  voxel_tag_t out_tag;
  logic [W-1:0] out_data;
  int rf [NN][NL];
  int checks = 0, failures = 0, partials = 0, cyc = 0;
  int cq[$];

  demodulator #(.N_THETA(NT), .N_PHI(NP), .IN_W(W)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (out_valid) begin
    longint acc;
    int k, l, c;
    k = int'(out_tag.nappe);
    l = int'(out_tag.phi) * NT + int'(out_tag.theta);
    c = cq.pop_front();
    acc = 0;
    for (int m = 0; m < 5; m++)
      if (k - m >= 0) acc += FIR_H[m] * ((rf[k-m][l] < 0) ? -rf[k-m][l] : rf[k-m][l]);
    checks++;
    if (longint'(out_data) != (acc >> 4) || cyc - c != 2 || out_partial != (k < 4)) begin
      failures++;
      $display("FAIL k=%0d l=%0d got %0d exp %0d", k, l, out_data, acc >> 4);
    end
    if (out_partial) partials++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < NN; k++)
      for (int l = 0; l < NL; l++) begin
        @(negedge clk);
        in_valid = 1;
        in_tag.nappe = NAPPE_W'(k);
        in_tag.phi = ANG_W'(l / NT);
        in_tag.theta = ANG_W'(l % NT);
        rf[k][l] = (k == 2 && l == 0) ? -(1 << (W - 1)) + 1 : int'($urandom % (1 << W)) - (1 << (W - 1));
        in_data = W'(rf[k][l]);
        cq.push_back(cyc);
        if ((k + l) % 5 == 0) begin
          @(negedge clk);
          in_valid = 0;
        end
      end
    @(negedge clk);
    in_valid = 0;
    repeat (4) @(posedge clk);
    if (checks != NN * NL || partials != 4 * NL) failures++;
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
