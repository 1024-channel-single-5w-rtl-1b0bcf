// tb_beamformer_full: one complete volume at the default configuration:
// 32 x 32 channels, 1024 samples per channel, 64 x 64 lines, 600 nappes.
//
// Loads pseudo-random echoes into all 1024 channels (one sample per cycle),
// reconstructs the full 64 x 64 x 600 volume and compares every 61st RF voxel
// with the independent model (reference delays, steering, Hanning weights,
// out-of-range channels zeroed) and every demodulated voxel with the 5-tap
// envelope filter of the RF stream. Checks that the volume takes exactly
// 64 * 64 * 600 = 2,457,600 cycles of RF output, i.e. one voxel per clock
// with no stall once the first reference table is ready.
module tb_beamformer_full;
  import us_pkg::*;
  import bf_model_pkg::*;
  localparam int NX = 32, NY = 32, S = 1024, NT = 64, NP = 64, NN = 600;
  localparam int CHECK_EVERY = 61;
  localparam int NCH = NX * NY, NL = NT * NP;
  localparam int CH_W = $clog2(NCH), AW = $clog2(S), CA_W = $clog2(NL);
  localparam int SUM_W = SAMPLE_W + $clog2(NCH);
  localparam longint WATCHDOG = 4000000;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  logic [DIST_W-1:0] cfg_r0 = 16'd320;       // 20 samples
  logic [DIST_W-1:0] cfg_dr = 16'd13;        // 0.8125 samples per nappe
  logic [COEF_W-1:0] cfg_pitch_h = 16'd256;  // half pitch: 1 sample
  logic coef_we = 0;
  coef_sel_e coef_sel = COEF_X;
  logic [CA_W-1:0] coef_addr = '0;
  logic signed [COEF_W-1:0] coef_data = '0;
  logic ld_valid = 0;
  logic [CH_W-1:0] ld_ch = '0;
  logic [AW-1:0] ld_addr = '0;
  logic signed [SAMPLE_W-1:0] ld_data = '0;
  logic start = 0;
  logic busy, stall, done, rf_valid, vox_valid;
  voxel_tag_t rf_tag, vox_tag;
  logic signed [SUM_W-1:0] rf_data;
  logic [SUM_W-1:0] vox_data;

  beamformer_top dut (.*);

  always #5 clk = ~clk;

  int cx [NL], cy [NP];
  longint refd [NCH];
  int ref_nappe = -1;
  int rf_seen [NN][NL];
  longint checks = 0, failures = 0;
  longint n_stall = 0, n_oor = 0, n_inr = 0, n_buf0 = 0, n_buf1 = 0;
  longint n_partial = 0, n_full = 0, n_wrap = 0, n_rf = 0, n_vox = 0, n_done = 0;
  longint cyc = 0, first_rf = -1, last_rf = -1;

  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) if (stall) n_stall++;
  always @(posedge clk) if (done) n_done++;

  function automatic longint model_rf(int k, int l);
    longint sum;
    if (k != ref_nappe) begin
      for (int e = 0; e < NCH; e++)
        refd[e] = ref_delay(longint'(cfg_r0) + longint'(k) * longint'(cfg_dr),
                            longint'(cfg_pitch_h), e % NX, e / NX, NX, NY);
      ref_nappe = k;
    end
    sum = 0;
    for (int e = 0; e < NCH; e++) begin
      longint idx;
      idx = sample_index(refd[e], cx[l], cy[l / NT], e % NX, e / NX, NX, NY);
      if (idx >= 0 && idx < S) begin
        sum += apodize(raw_sample(e, int'(idx)), e, NX, NY);
        n_inr++;
      end else n_oor++;
    end
    return sum;
  endfunction

  always @(posedge clk) if (rf_valid) begin
    int k, l;
    k = int'(rf_tag.nappe);
    l = int'(rf_tag.phi) * NT + int'(rf_tag.theta);
    rf_seen[k][l] = int'(rf_data);
    if (first_rf < 0) first_rf = cyc;
    last_rf = cyc;
    n_rf++;
    if (k % 2 == 0) n_buf0++; else n_buf1++;
    if ((k * NL + l) % CHECK_EVERY == 0) begin
      longint e;
      e = model_rf(k, l);
      checks++;
      if (longint'(rf_data) != e) begin
        failures++;
        if (failures < 10) $display("FAIL rf nappe %0d line %0d got %0d exp %0d", k, l, rf_data, e);
      end
    end
  end

  always @(posedge clk) if (vox_valid) begin
    int k, l;
    longint acc;
    k = int'(vox_tag.nappe);
    l = int'(vox_tag.phi) * NT + int'(vox_tag.theta);
    acc = 0;
    for (int m = 0; m < 5; m++)
      if (k - m >= 0) acc += FIR_H[m] * ((rf_seen[k-m][l] < 0) ? -rf_seen[k-m][l] : rf_seen[k-m][l]);
    checks++;
    n_vox++;
    if (k < 4) n_partial++; else n_full++;
    if (k >= 5) n_wrap++;
    if (longint'(vox_data) != (acc >> 4)) begin
      failures++;
      if (failures < 10) $display("FAIL vox nappe %0d line %0d got %0d exp %0d", k, l, vox_data, acc >> 4);
    end
  end

  task automatic expect_seen(string what, longint n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end else $display("  %-34s %0d", what, n);
  endtask

  initial begin
    real th, ph;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // Steering coefficients for a sector of +-30 deg (theta) by +-20 deg (phi).
    for (int p = 0; p < NP; p++) begin
      ph = (-20.0 + 40.0 * real'(p) / real'(NP - 1)) * 3.14159265358979 / 180.0;
      for (int t = 0; t < NT; t++) begin
        th = (-30.0 + 60.0 * real'(t) / real'(NT - 1)) * 3.14159265358979 / 180.0;
        @(negedge clk);
        coef_we = 1; coef_sel = COEF_X; coef_addr = CA_W'(p * NT + t);
        coef_data = COEF_W'($rtoi(real'(cfg_pitch_h) * $sin(th) * $cos(ph) + (th >= 0 ? 0.5 : -0.5)));
        cx[p * NT + t] = int'(coef_data);
      end
      @(negedge clk);
      coef_we = 1; coef_sel = COEF_Y; coef_addr = CA_W'(p);
      coef_data = COEF_W'($rtoi(real'(cfg_pitch_h) * $sin(ph) + (ph >= 0 ? 0.5 : -0.5)));
      cy[p] = int'(coef_data);
    end
    @(negedge clk);
    coef_we = 0;
    // Echo load, one sample per cycle.
    for (int s = 0; s < S; s++)
      for (int c = 0; c < NCH; c++) begin
        @(negedge clk);
        ld_valid = 1;
        ld_ch = CH_W'(c);
        ld_addr = AW'(s);
        ld_data = SAMPLE_W'(raw_sample(c, s));
      end
    @(negedge clk);
    ld_valid = 0;
    repeat (4) @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    while (n_done == 0) @(negedge clk);
    repeat (3) @(negedge clk);
    checks += 2;
    if (n_rf != NN * NL || n_vox != NN * NL) begin
      failures++;
      $display("FAIL voxel count rf %0d vox %0d", n_rf, n_vox);
    end
    if (last_rf - first_rf + 1 != NN * NL || n_stall != 0) begin
      failures++;
      $display("FAIL rate: %0d cycles for %0d voxels and %0d stall cycles",
               last_rf - first_rf + 1, NN * NL, n_stall);
    end
    $display("volume: %0d voxels in %0d cycles", NN * NL, last_rf - first_rf + 1);
    expect_seen("channels out of range (zeroed)", n_oor);
    expect_seen("channels in range", n_inr);
    expect_seen("voxels using table 0", n_buf0);
    expect_seen("voxels using table 1", n_buf1);
    expect_seen("partial filter windows", n_partial);
    expect_seen("full filter windows", n_full);
    expect_seen("circular buffer wrapped", n_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
