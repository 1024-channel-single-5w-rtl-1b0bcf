// hann_apodizer: static 2-D Hanning pre-apodization of incoming echo samples.
//
// Every echo sample is weighted once, on its way into the echo memory, by the
// fixed weight of the element that received it: w(i,j) = h(i) * h(j), where i
// and j are the element's column and row in the N_X x N_Y matrix probe and
// h(n) = 0.5 * (1 - cos(2*pi*(n+1)/(N+1))). Because the window is static, the
// stored samples are already apodized and the beamforming datapath needs no
// per-voxel weighting. The 1-D tables are computed at elaboration time in
// unsigned Q1.15; the 2-D weight is their product rounded back to Q1.15, and
// the weighted sample is rounded to SAMPLE_W bits.
//
// Channel numbering: ch = j * N_X + i. Latency: 2 cycles, one sample per cycle.
// Following the published design: the window is a static Hanning window
// applied before storage. This design's own choices: the exact Hanning
// formula (no zero-weight edge elements), Q1.15 weights and round-to-nearest.
module hann_apodizer
  import us_pkg::*;
#(
  parameter int N_X    = 32,
  parameter int N_Y    = 32,
  parameter int ADDR_W = 10,
  localparam int N_CH  = N_X * N_Y,
  localparam int CH_W  = $clog2(N_CH)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  input  logic [CH_W-1:0]            in_ch,
  input  logic [ADDR_W-1:0]          in_addr,
  input  logic signed [SAMPLE_W-1:0] in_data,
  output logic                       out_valid,
  output logic [CH_W-1:0]            out_ch,
  output logic [ADDR_W-1:0]          out_addr,
  output logic signed [SAMPLE_W-1:0] out_data
);
  localparam int WT_W = WEIGHT_FRAC + 1;
  typedef logic [WT_W-1:0] wx_tab_t [N_X];
  typedef logic [WT_W-1:0] wy_tab_t [N_Y];

  function automatic real hann(int n, int len);
    return 0.5 * (1.0 - $cos(2.0 * 3.14159265358979323846 * real'(n + 1) / real'(len + 1)));
  endfunction

  function automatic wx_tab_t make_wx();
    wx_tab_t t;
    for (int n = 0; n < N_X; n++)
      t[n] = WT_W'($rtoi(hann(n, N_X) * real'(1 << WEIGHT_FRAC) + 0.5));
    return t;
  endfunction

  function automatic wy_tab_t make_wy();
    wy_tab_t t;
    for (int n = 0; n < N_Y; n++)
      t[n] = WT_W'($rtoi(hann(n, N_Y) * real'(1 << WEIGHT_FRAC) + 0.5));
    return t;
  endfunction

  localparam wx_tab_t WX = make_wx();
  localparam wy_tab_t WY = make_wy();

  // Stage 1: 2-D weight of the element, sample held alongside.
  logic                       s1_valid;
  logic [CH_W-1:0]            s1_ch;
  logic [ADDR_W-1:0]          s1_addr;
  logic signed [SAMPLE_W-1:0] s1_data;
  logic [WT_W-1:0]            s1_w;
  logic [2*WT_W-1:0]          w_prod;

  always_comb begin
    w_prod = WX[int'(in_ch) % N_X] * WY[int'(in_ch) / N_X];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_ch    <= '0;
      s1_addr  <= '0;
      s1_data  <= '0;
      s1_w     <= '0;
    end else begin
      s1_valid <= in_valid;
      s1_ch    <= in_ch;
      s1_addr  <= in_addr;
      s1_data  <= in_data;
      s1_w     <= WT_W'((w_prod + (2*WT_W)'(1 << (WEIGHT_FRAC - 1))) >> WEIGHT_FRAC);
    end
  end

  // Stage 2: weighted sample, rounded to nearest.
  logic signed [SAMPLE_W-1:0] prod;
  always_comb begin
    prod = in_mul(s1_data, s1_w);
  end

  function automatic logic signed [SAMPLE_W-1:0] in_mul(logic signed [SAMPLE_W-1:0] x,
                                                           logic [WT_W-1:0] w);
    logic signed [SAMPLE_W+WT_W:0] p;
    p = (SAMPLE_W+WT_W+1)'(x) * $signed({1'b0, w});
    // |x * w| <= 2^15 * 2^15, so the rounded result always fits SAMPLE_W bits.
    return SAMPLE_W'((p + (SAMPLE_W+WT_W+1)'(1 << (WEIGHT_FRAC - 1))) >>> WEIGHT_FRAC);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_ch    <= '0;
      out_addr  <= '0;
      out_data  <= '0;
    end else begin
      out_valid <= s1_valid;
      out_ch    <= s1_ch;
      out_addr  <= s1_addr;
      out_data  <= prod;
    end
  end
endmodule
