// beamformer_top: single-chip 1024-channel volumetric ultrasound beamformer.
//
// Echoes of one insonification from an N_X x N_Y matrix probe are loaded, one
// sample per cycle, through a static Hanning apodizer into the echo store,
// where each pair of channels shares a dual-port RAM. The volume (N_NAPPE
// depths x N_PHI x N_THETA lines of sight) is then reconstructed at one voxel
// per clock: for each voxel the steering unit turns the nappe's reference
// delays (TX + RX on the central line of sight, computed one nappe ahead by
// the reference-delay engine with one square root per element) into one
// sample index per channel, all channels are read in parallel, out-of-range
// channels contribute zero, the adder tree sums the N_X*N_Y samples into an
// RF voxel, and the demodulator rectifies it and low-pass filters it along
// depth over five nappes.
//
// Interface:
//   cfg_*      geometry: first depth r0 and depth step dr (unsigned Q12.4
//              sample units), half element pitch (unsigned Q8.8 sample units).
//   coef_*     writes of the steering coefficients (see steering_unit).
//   ld_*       echo load: channel j*N_X+i, sample index, raw signed sample.
//   start      starts one volume; busy is high while voxels are issued;
//              stall is high while the scan waits for a reference table.
//   rf_*       beamformed RF voxels (adder-tree output).
//   vox_*      demodulated voxels; done pulses with the volume's last one.
// Timing: first voxel issue N_X*N_Y + SQRT_IN_W/2 + ~4 cycles after start,
// then one voxel per cycle. rf_* follows the issue by 4 + clog2(N_X*N_Y)
// cycles, vox_* by two more.
// The block structure, the one-voxel-per-clock rate and the default sizes
// (32 x 32 channels, 64 x 64 x 600 voxels) follow the published design; the
// echo depth (SAMPLES), number formats and interfaces are this design's own.
module beamformer_top
  import us_pkg::*;
#(
  parameter int N_X     = 32,
  parameter int N_Y     = 32,
  parameter int SAMPLES = 1024,
  parameter int N_THETA = 64,
  parameter int N_PHI   = 64,
  parameter int N_NAPPE = 600,
  localparam int N_CH   = N_X * N_Y,
  localparam int CH_W   = $clog2(N_CH),
  localparam int AW     = $clog2(SAMPLES),
  localparam int CA_W   = $clog2(N_THETA * N_PHI),
  localparam int SUM_W  = SAMPLE_W + $clog2(N_CH)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [DIST_W-1:0]          cfg_r0,
  input  logic [DIST_W-1:0]          cfg_dr,
  input  logic [COEF_W-1:0]          cfg_pitch_h,
  input  logic                       coef_we,
  input  coef_sel_e                  coef_sel,
  input  logic [CA_W-1:0]            coef_addr,
  input  logic signed [COEF_W-1:0]   coef_data,
  input  logic                       ld_valid,
  input  logic [CH_W-1:0]            ld_ch,
  input  logic [AW-1:0]              ld_addr,
  input  logic signed [SAMPLE_W-1:0] ld_data,
  input  logic                       start,
  output logic                       busy,
  output logic                       stall,
  output logic                       done,
  output logic                       rf_valid,
  output voxel_tag_t                 rf_tag,
  output logic signed [SUM_W-1:0]    rf_data,
  output logic                       vox_valid,
  output voxel_tag_t                 vox_tag,
  output logic [SUM_W-1:0]           vox_data
);
  // ---------------- echo load path: apodizer -> echo store ----------------
  logic                       ap_valid;
  logic [CH_W-1:0]            ap_ch;
  logic [AW-1:0]              ap_addr;
  logic signed [SAMPLE_W-1:0] ap_data;

  hann_apodizer #(.N_X(N_X), .N_Y(N_Y), .ADDR_W(AW)) u_apod (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (ld_valid),
    .in_ch     (ld_ch),
    .in_addr   (ld_addr),
    .in_data   (ld_data),
    .out_valid (ap_valid),
    .out_ch    (ap_ch),
    .out_addr  (ap_addr),
    .out_data  (ap_data)
  );

  // ---------------- scan and delay calculation ----------------
  logic               calc_start, calc_busy, scan_done;
  logic [NAPPE_W-1:0] calc_nappe;
  logic               sc_valid;
  voxel_tag_t         sc_tag;
  logic [REF_W-1:0]   ref_tab [2][N_CH];

  voxel_scan_ctrl #(.N_THETA(N_THETA), .N_PHI(N_PHI), .N_NAPPE(N_NAPPE)) u_scan (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (start),
    .busy       (busy),
    .done       (scan_done),
    .stall      (stall),
    .calc_busy  (calc_busy),
    .calc_start (calc_start),
    .calc_nappe (calc_nappe),
    .vox_valid  (sc_valid),
    .vox_tag    (sc_tag)
  );

  ref_delay_engine #(.N_X(N_X), .N_Y(N_Y)) u_ref (
    .clk         (clk),
    .rst_n       (rst_n),
    .cfg_r0      (cfg_r0),
    .cfg_dr      (cfg_dr),
    .cfg_pitch_h (cfg_pitch_h),
    .calc_start  (calc_start),
    .calc_nappe  (calc_nappe),
    .busy        (calc_busy),
    .ref_tab     (ref_tab)
  );

  logic            st_valid;
  voxel_tag_t      st_tag;
  logic [AW-1:0]   st_addr [N_CH];
  logic            st_hit  [N_CH];

  steering_unit #(
    .N_X(N_X), .N_Y(N_Y), .N_THETA(N_THETA), .N_PHI(N_PHI), .SAMPLES(SAMPLES)
  ) u_steer (
    .clk       (clk),
    .rst_n     (rst_n),
    .coef_we   (coef_we),
    .coef_sel  (coef_sel),
    .coef_addr (coef_addr),
    .coef_data (coef_data),
    .in_valid  (sc_valid),
    .in_tag    (sc_tag),
    .ref_tab   (ref_tab),
    .out_valid (st_valid),
    .out_tag   (st_tag),
    .out_addr  (st_addr),
    .out_hit   (st_hit)
  );

  // ---------------- echo store: one delayed sample per channel ----------------
  logic [SAMPLE_W-1:0]        es_rdata [N_CH];
  logic signed [SAMPLE_W-1:0] bf_in    [N_CH];
  logic                       es_valid;
  voxel_tag_t                 es_tag;

  echo_store #(.N_CH(N_CH), .SAMPLES(SAMPLES), .W(SAMPLE_W)) u_store (
    .clk     (clk),
    .wr_en   (ap_valid),
    .wr_ch   (ap_ch),
    .wr_addr (ap_addr),
    .wr_data (ap_data),
    .rd_addr (st_addr),
    .rd_data (es_rdata)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      es_valid <= 1'b0;
      es_tag   <= '0;
    end else begin
      es_valid <= st_valid;
      es_tag   <= st_tag;
    end
  end

  for (genvar e = 0; e < N_CH; e++) begin : g_mask
    logic hit_q;
    always_ff @(posedge clk) hit_q <= st_hit[e];
    assign bf_in[e] = hit_q ? $signed(es_rdata[e]) : '0;
  end

  // ---------------- N_CH:1 adder tree ----------------
  logic [$bits(voxel_tag_t)-1:0] rf_tag_bits;

  adder_tree #(.N(N_CH), .IN_W(SAMPLE_W), .TAG_W($bits(voxel_tag_t))) u_tree (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (es_valid),
    .in_tag    (es_tag),
    .in_data   (bf_in),
    .out_valid (rf_valid),
    .out_tag   (rf_tag_bits),
    .out_sum   (rf_data)
  );
  assign rf_tag = voxel_tag_t'(rf_tag_bits);

  // ---------------- demodulation ----------------
  logic vox_partial;

  demodulator #(.N_THETA(N_THETA), .N_PHI(N_PHI), .IN_W(SUM_W)) u_demod (
    .clk         (clk),
    .rst_n       (rst_n),
    .in_valid    (rf_valid),
    .in_tag      (rf_tag),
    .in_data     (rf_data),
    .out_valid   (vox_valid),
    .out_tag     (vox_tag),
    .out_data    (vox_data),
    .out_partial (vox_partial)
  );

  assign done = vox_valid && int'(vox_tag.nappe) == N_NAPPE - 1
             && int'(vox_tag.phi) == N_PHI - 1 && int'(vox_tag.theta) == N_THETA - 1;

  // The partial-window flag and the end of the issue phase are not needed at
  // the ports; a table request must never be refused.
  logic unused;
  assign unused = vox_partial ^ scan_done;

  a_calc_accepted: assert property (@(posedge clk) calc_start |-> !calc_busy);
endmodule
