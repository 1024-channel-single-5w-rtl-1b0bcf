// tb_steering_unit: random reference tables and steering coefficients on a
// 4 x 4 probe with 4 x 2 lines; every channel's sample index and range flag
// is compared with ref - steering rounded to nearest, 3 cycles after issue.
module tb_steering_unit;
  import us_pkg::*;
  import bf_model_pkg::*;
  localparam int NX = 4, NY = 4, NEL = 16, NT = 4, NP = 2, S = 64;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  logic coef_we = 0;
  coef_sel_e coef_sel = COEF_X;
  logic [2:0] coef_addr = '0;
  logic signed [COEF_W-1:0] coef_data = '0;
  logic in_valid = 0;
  voxel_tag_t in_tag = '0;
  logic [REF_W-1:0] ref_tab [2][NEL];
  logic out_valid;
  voxel_tag_t out_tag;
  logic [5:0] out_addr [NEL];
  logic out_hit [NEL];
  int cx [NT*NP], cy [NP];
  int checks = 0, failures = 0, hits = 0, misses = 0, cyc = 0;
  voxel_tag_t tq[$];
  int cq[$];

  steering_unit #(.N_X(NX), .N_Y(NY), .N_THETA(NT), .N_PHI(NP), .SAMPLES(S)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (out_valid) begin
    voxel_tag_t t;
    int c;
    t = tq.pop_front();
    c = cq.pop_front();
    checks++;
    if (out_tag != t || cyc - c != 3) failures++;
    for (int e = 0; e < NEL; e++) begin
      longint idx;
      logic h;
      idx = sample_index(longint'(ref_tab[t.nappe[0]][e]), cx[int'(t.phi)*NT + int'(t.theta)],
                         cy[t.phi], e % NX, e / NX, NX, NY);
      h = idx >= 0 && idx < S;
      checks++;
      if (out_hit[e] != h || (h && longint'(out_addr[e]) != idx)) begin
        failures++;
        $display("FAIL e=%0d got %0d/%0d exp %0d/%0d", e, out_addr[e], out_hit[e], idx, h);
      end
      if (h) hits++; else misses++;
    end
  end

  initial begin
    for (int b = 0; b < 2; b++)
      for (int e = 0; e < NEL; e++) ref_tab[b][e] = REF_W'(($urandom % 70) * 16 + $urandom % 16);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < NT * NP; k++) begin
      @(negedge clk);
      coef_we = 1; coef_sel = COEF_X; coef_addr = 3'(k);
      coef_data = COEF_W'(int'($urandom % 2001) - 1000);
      cx[k] = int'(coef_data);
    end
    for (int k = 0; k < NP; k++) begin
      @(negedge clk);
      coef_we = 1; coef_sel = COEF_Y; coef_addr = 3'(k);
      coef_data = COEF_W'(int'($urandom % 2001) - 1000);
      cy[k] = int'(coef_data);
    end
    @(negedge clk);
    coef_we = 0;
    for (int k = 0; k < 64; k++) begin
      @(negedge clk);
      in_valid = 1;
      in_tag.theta = ANG_W'(k % NT);
      in_tag.phi   = ANG_W'((k / NT) % NP);
      in_tag.nappe = NAPPE_W'(k / (NT * NP));
      tq.push_back(in_tag);
      cq.push_back(cyc);
    end
    @(negedge clk);
    in_valid = 0;
    repeat (6) @(posedge clk);
    if (hits == 0 || misses == 0) begin
      failures++;
      $display("FAIL range check not exercised: hits %0d misses %0d", hits, misses);
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
