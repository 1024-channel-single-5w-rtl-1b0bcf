// ref_delay_engine: reference delays of all elements for one nappe (depth).
//
// For a voxel at distance r from the probe centre on the central line of
// sight, the round-trip delay to element (i,j) is r (transmit, from the
// centre) plus sqrt(r^2 + x_i^2 + y_j^2) (receive), where x_i = p*(2i-N_X+1)/2
// and y_j = p*(2j-N_Y+1)/2 for element pitch p. Off-axis voxels of the same
// nappe are reached later by the steering unit with two additions per delay,
// so one square root per element and nappe is all that is computed here.
//
// On calc_start (accepted only while idle) the engine latches
// r = cfg_r0 + calc_nappe * cfg_dr and issues one element per cycle into a
// pipelined square root (sqrt_pipe). Results are written into table
// ref_tab[calc_nappe % 2]; the other table stays untouched and is the one the
// steering unit reads for the current nappe (double buffering). busy is high
// from the cycle after calc_start until the last element is written:
// N_EL + SQRT_IN_W/2 + 1 cycles after the cycle of calc_start.
//
// Formats (this design's choice): r0, dr unsigned Q12.4 sample units,
// cfg_pitch_h = p/2 unsigned Q8.8 sample units, radicand Q28.8, table entries
// unsigned Q14.4, saturated. The reference-plus-steering split and the use of
// square roots on the central line follow the published delay algorithm.
module ref_delay_engine
  import us_pkg::*;
#(
  parameter int N_X = 32,
  parameter int N_Y = 32,
  localparam int N_EL = N_X * N_Y,
  localparam int EL_W = $clog2(N_EL)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [DIST_W-1:0]    cfg_r0,
  input  logic [DIST_W-1:0]    cfg_dr,
  input  logic [COEF_W-1:0]    cfg_pitch_h,
  input  logic                 calc_start,
  input  logic [NAPPE_W-1:0]   calc_nappe,
  output logic                 busy,
  output logic [REF_W-1:0]     ref_tab [2][N_EL]
);
  localparam int ROOT_W = SQRT_IN_W / 2;

  logic [DIST_W-1:0] r_q;
  logic              buf_q;
  logic              issuing;
  logic [EL_W-1:0]   e_cnt;

  // Element geometry of the element being issued: u = (2i-N_X+1)^2 + (2j-N_Y+1)^2,
  // so that x^2 + y^2 = (p/2)^2 * u.
  int unsigned       u;
  logic [2*COEF_W-1:0]   ph2;      // (p/2)^2, Q.16
  logic [2*DIST_W-1:0]   r2;       // r^2, Q.8
  logic [63:0]           rho2;     // x^2 + y^2, Q.8
  logic [SQRT_IN_W:0]    rad_full;
  logic [SQRT_IN_W-1:0]  rad;

  always_comb begin
    int ci, cj;
    ci       = 2 * (int'(e_cnt) % N_X) - N_X + 1;
    cj       = 2 * (int'(e_cnt) / N_X) - N_Y + 1;
    u        = unsigned'(ci * ci + cj * cj);
    ph2      = cfg_pitch_h * cfg_pitch_h;
    r2       = r_q * r_q;
    rho2     = (64'(ph2) * 64'(u)) >> COEF_FRAC;
    rad_full = (SQRT_IN_W+1)'(r2) + (SQRT_IN_W+1)'(rho2);
    if (rad_full[SQRT_IN_W] || (rho2 >> SQRT_IN_W) != 0) rad = '1;
    else                                                 rad = rad_full[SQRT_IN_W-1:0];
  end

  logic                  sq_in_valid;
  logic [SQRT_IN_W-1:0]  sq_in_rad;
  logic [EL_W-1:0]       sq_in_tag;
  logic                  sq_out_valid;
  logic [ROOT_W-1:0]     sq_out_root;
  logic [EL_W-1:0]       sq_out_tag;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_q         <= '0;
      buf_q       <= 1'b0;
      issuing     <= 1'b0;
      e_cnt       <= '0;
      busy        <= 1'b0;
      sq_in_valid <= 1'b0;
      sq_in_rad   <= '0;
      sq_in_tag   <= '0;
    end else begin
      sq_in_valid <= issuing;
      sq_in_rad   <= rad;
      sq_in_tag   <= e_cnt;
      if (calc_start && !busy) begin
        r_q     <= DIST_W'(cfg_r0 + calc_nappe * cfg_dr);
        buf_q   <= calc_nappe[0];
        issuing <= 1'b1;
        e_cnt   <= '0;
        busy    <= 1'b1;
      end else begin
        if (issuing) begin
          if (int'(e_cnt) == N_EL - 1) issuing <= 1'b0;
          e_cnt <= e_cnt + 1'b1;
        end
        if (sq_out_valid && int'(sq_out_tag) == N_EL - 1) busy <= 1'b0;
      end
    end
  end

  sqrt_pipe #(.IN_W(SQRT_IN_W), .TAG_W(EL_W)) u_sqrt (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (sq_in_valid),
    .in_rad    (sq_in_rad),
    .in_tag    (sq_in_tag),
    .out_valid (sq_out_valid),
    .out_root  (sq_out_root),
    .out_tag   (sq_out_tag)
  );

  // Total delay r + sqrt(...), saturated to the table width.
  logic [ROOT_W:0]     tot;
  logic [REF_W-1:0]    tot_sat;
  always_comb begin
    tot = (ROOT_W+1)'(r_q) + (ROOT_W+1)'(sq_out_root);
    tot_sat = ((tot >> REF_W) != 0) ? '1 : REF_W'(tot);
  end

  for (genvar b = 0; b < 2; b++) begin : g_buf
    for (genvar e = 0; e < N_EL; e++) begin : g_el
      logic [REF_W-1:0] q;
      always_ff @(posedge clk) begin
        if (sq_out_valid && buf_q == 1'(b) && sq_out_tag == EL_W'(e))
          q <= tot_sat;
      end
      assign ref_tab[b][e] = q;
    end
  end
endmodule
