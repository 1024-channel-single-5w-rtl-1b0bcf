// tb_point_target: imaging check of the whole beamformer with a synthetic
// point scatterer, on an 8 x 8 probe (half pitch = 1 sample, i.e. lambda/2 at
// a centre frequency of a quarter of the sampling rate), 9 x 5 lines over
// +-30 deg x +-20 deg and 40 nappes from 40 to 79 samples deep.
//
// Every channel receives a Gaussian-windowed pulse centred on the exact
// round-trip time centre -> scatterer -> element. The brightest RF voxel must
// be the scatterer's line of sight at the nearest depth (+-1 nappe), and the
// brightest demodulated voxel the same line two nappes deeper (the filter
// window ends at the output nappe), +-1. The focus must also stand out: the
// peak must exceed the brightest voxel three or more lines away by a factor 2.
module tb_point_target;
  import us_pkg::*;
  localparam int NX = 8, NY = 8, S = 256, NT = 9, NP = 5, NN = 40;
  localparam int NCH = NX * NY, NL = NT * NP;
  localparam int CH_W = $clog2(NCH), AW = $clog2(S), CA_W = $clog2(NL);
  localparam int SUM_W = SAMPLE_W + $clog2(NCH);
  localparam real PI = 3.14159265358979;
  localparam int T_TH = 6, T_PH = 3;     // scatterer line: theta 15 deg, phi 10 deg
  localparam real T_R = 60.0;            // scatterer depth, samples

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  logic [DIST_W-1:0] cfg_r0 = 16'd640;       // 40 samples
  logic [DIST_W-1:0] cfg_dr = 16'd16;        // 1 sample per nappe
  logic [COEF_W-1:0] cfg_pitch_h = 16'd256;  // 1 sample
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

  beamformer_top #(.N_X(NX), .N_Y(NY), .SAMPLES(S), .N_THETA(NT), .N_PHI(NP), .N_NAPPE(NN)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint rf_abs [NN][NL];
  longint env [NN][NL];
  bit got_done = 0;

  always @(posedge clk) if (rf_valid)
    rf_abs[rf_tag.nappe][int'(rf_tag.phi) * NT + int'(rf_tag.theta)] = (rf_data < 0) ? -longint'(rf_data) : longint'(rf_data);
  always @(posedge clk) if (vox_valid)
    env[vox_tag.nappe][int'(vox_tag.phi) * NT + int'(vox_tag.theta)] = longint'(vox_data);
  always @(posedge clk) if (done) got_done = 1;

  function automatic real theta_of(int t); return (-30.0 + 60.0 * real'(t) / real'(NT - 1)) * PI / 180.0; endfunction
  function automatic real phi_of(int p);   return (-20.0 + 40.0 * real'(p) / real'(NP - 1)) * PI / 180.0; endfunction

  // Brightest voxel of a volume; also the brightest one at least 3 lines away.
  task automatic find_peak(input longint v [NN][NL], input int exp_k, input string what);
    longint best, far_best;
    int bk, bl;
    best = -1; far_best = 0; bk = 0; bl = 0;
    for (int k = 0; k < NN; k++)
      for (int l = 0; l < NL; l++)
        if (v[k][l] > best) begin best = v[k][l]; bk = k; bl = l; end
    for (int k = 0; k < NN; k++)
      for (int l = 0; l < NL; l++)
        if ((l % NT - T_TH >= 3 || T_TH - l % NT >= 3 || l / NT - T_PH >= 3 || T_PH - l / NT >= 3)
            && v[k][l] > far_best) far_best = v[k][l];
    $display("%s peak %0d at nappe %0d theta %0d phi %0d (expected %0d/%0d/%0d); far peak %0d",
             what, best, bk, bl % NT, bl / NT, exp_k, T_TH, T_PH, far_best);
    checks += 3;
    if (bl != T_PH * NT + T_TH) begin failures++; $display("FAIL %s: wrong line", what); end
    if (bk < exp_k - 1 || bk > exp_k + 1) begin failures++; $display("FAIL %s: wrong depth", what); end
    if (best < 2 * far_best) begin failures++; $display("FAIL %s: focus does not stand out", what); end
  endtask

  initial begin
    real th, ph, sx, sy, sz, tof, x;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < NP; p++) begin
      ph = phi_of(p);
      for (int t = 0; t < NT; t++) begin
        th = theta_of(t);
        @(negedge clk);
        coef_we = 1; coef_sel = COEF_X; coef_addr = CA_W'(p * NT + t);
        coef_data = COEF_W'($rtoi(256.0 * $sin(th) * $cos(ph) + (th >= 0 ? 0.5 : -0.5)));
      end
      @(negedge clk);
      coef_we = 1; coef_sel = COEF_Y; coef_addr = CA_W'(p);
      coef_data = COEF_W'($rtoi(256.0 * $sin(ph) + (ph >= 0 ? 0.5 : -0.5)));
    end
    @(negedge clk);
    coef_we = 0;
    // Scatterer position and echoes.
    th = theta_of(T_TH);
    ph = phi_of(T_PH);
    sx = T_R * $sin(th) * $cos(ph);
    sy = T_R * $sin(ph);
    sz = T_R * $cos(th) * $cos(ph);
    for (int c = 0; c < NCH; c++) begin
      real ex, ey;
      ex = real'(2 * (c % NX) - NX + 1);
      ey = real'(2 * (c / NX) - NY + 1);
      tof = T_R + $sqrt((sx - ex) ** 2 + (sy - ey) ** 2 + sz ** 2);
      for (int s = 0; s < S; s++) begin
        x = real'(s) - tof;
        @(negedge clk);
        ld_valid = 1;
        ld_ch = CH_W'(c);
        ld_addr = AW'(s);
        ld_data = SAMPLE_W'($rtoi(20000.0 * $cos(2.0 * PI * x / 4.0) * $exp(-(x / 3.0) ** 2)));
      end
    end
    @(negedge clk);
    ld_valid = 0;
    repeat (4) @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    while (!got_done) @(negedge clk);
    find_peak(rf_abs, 20, "RF");
    find_peak(env, 22, "envelope");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
