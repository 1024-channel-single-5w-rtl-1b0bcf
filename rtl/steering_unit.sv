// steering_unit: per-voxel sample indices of all channels by steering.
//
// For a voxel on the line of sight (theta, phi) at the current nappe, the
// delay of element (i,j) is approximated as
//     d(i,j) = ref(i,j) - (2i-N_X+1) * a - (2j-N_Y+1) * b
// where ref is the reference delay of the nappe on the central line of sight
// (from ref_delay_engine), a = (p/2) sin(theta) cos(phi) and b = (p/2) sin(phi),
// in sample units. The products with the element offsets are shared by a
// whole column or row of the probe, so each delay costs two additions.
// a and b come from two coefficient RAMs that the host fills once for the
// scan geometry: COEF_X at address phi*N_THETA + theta, COEF_Y at address phi,
// signed Q7.8.
//
// Pipeline, 3 cycles: (1) coefficient RAM read, (2) column and row steering
// terms, (3) the two additions, rounding to the nearest sample and a range
// check. out_hit(e) is low when the index falls outside 0..SAMPLES-1; that
// channel must then contribute zero. The table of ref_tab used is the one of
// the voxel's nappe parity.
// The delay formula with two steering additions follows the published
// algorithm; nearest-sample indexing, coefficient formats and the
// out-of-range rule are this design's choices.
module steering_unit
  import us_pkg::*;
#(
  parameter int N_X     = 32,
  parameter int N_Y     = 32,
  parameter int N_THETA = 64,
  parameter int N_PHI   = 64,
  parameter int SAMPLES = 1024,
  localparam int N_EL   = N_X * N_Y,
  localparam int AW     = $clog2(SAMPLES),
  localparam int CA_W   = $clog2(N_THETA * N_PHI)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     coef_we,
  input  coef_sel_e                coef_sel,
  input  logic [CA_W-1:0]          coef_addr,
  input  logic signed [COEF_W-1:0] coef_data,
  input  logic                     in_valid,
  input  voxel_tag_t               in_tag,
  input  logic [REF_W-1:0]         ref_tab [2][N_EL],
  output logic                     out_valid,
  output voxel_tag_t               out_tag,
  output logic [AW-1:0]            out_addr [N_EL],
  output logic                     out_hit [N_EL]
);
  localparam int ST_W = COEF_W + 8;   // coefficient times an offset of at most +-255
  localparam int D_W  = 32;

  logic signed [COEF_W-1:0] cx_mem [N_THETA * N_PHI];
  logic signed [COEF_W-1:0] cy_mem [N_PHI];

  always_ff @(posedge clk) begin
    if (coef_we && coef_sel == COEF_X) cx_mem[coef_addr] <= coef_data;
    if (coef_we && coef_sel == COEF_Y) cy_mem[coef_addr[$clog2(N_PHI)-1:0]] <= coef_data;
  end

  // Stage 1: coefficient read.
  logic                     v1;
  voxel_tag_t               t1;
  logic signed [COEF_W-1:0] a1, b1;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0;
      t1 <= '0;
    end else begin
      v1 <= in_valid;
      t1 <= in_tag;
    end
  end
  always_ff @(posedge clk) begin
    a1 <= cx_mem[CA_W'(int'(in_tag.phi) * N_THETA + int'(in_tag.theta))];
    b1 <= cy_mem[in_tag.phi[$clog2(N_PHI)-1:0]];
  end

  // Stage 2: steering terms of every column and row.
  logic             v2;
  voxel_tag_t       t2;
  logic signed [ST_W-1:0] sx [N_X];
  logic signed [ST_W-1:0] sy [N_Y];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v2 <= 1'b0;
      t2 <= '0;
    end else begin
      v2 <= v1;
      t2 <= t1;
    end
  end
  for (genvar i = 0; i < N_X; i++) begin : g_col
    logic signed [ST_W-1:0] q;
    always_ff @(posedge clk) q <= ST_W'(a1) * ST_W'(2 * i - N_X + 1);
    assign sx[i] = q;
  end
  for (genvar j = 0; j < N_Y; j++) begin : g_row
    logic signed [ST_W-1:0] q;
    always_ff @(posedge clk) q <= ST_W'(b1) * ST_W'(2 * j - N_Y + 1);
    assign sy[j] = q;
  end

  // Stage 3: two additions per delay, rounding and range check.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_tag   <= '0;
    end else begin
      out_valid <= v2;
      out_tag   <= t2;
    end
  end
  for (genvar e = 0; e < N_EL; e++) begin : g_el
    logic [REF_W-1:0]      r;
    logic signed [D_W-1:0] d;
    logic signed [D_W-1:0] idx;
    logic [AW-1:0]         addr_q;
    logic                  hit_q;
    always_comb begin
      r   = t2.nappe[0] ? ref_tab[1][e] : ref_tab[0][e];
      d   = (D_W'(r) <<< (COEF_FRAC - DIST_FRAC)) - D_W'(sx[e % N_X]) - D_W'(sy[e / N_X]);
      idx = (d + D_W'(1 << (COEF_FRAC - 1))) >>> COEF_FRAC;
    end
    always_ff @(posedge clk) begin
      addr_q <= AW'(idx);
      hit_q  <= (idx >= 0) && (idx < D_W'(SAMPLES));
    end
    assign out_addr[e] = addr_q;
    assign out_hit[e]  = hit_q;
  end
endmodule
