// demodulator: envelope of the beamformed RF voxels along depth.
//
// Each RF voxel is rectified (absolute value) and low-pass filtered with a
// 5-tap FIR along its line of sight: out(k) = sum_m H[m] * |x(k-m)| >> H_SHIFT,
// m = 0..4, where k is the nappe. Since voxels arrive nappe by nappe, the
// previous four values of the same line live in a circular buffer of five
// nappes: five RAMs of N_LINES words; nappe k is written into RAM k mod 5
// while the other four are read at the same line address. Taps older than
// nappe 0 count as zero, so the first four nappes see a partial window
// (out_partial). The output for nappe k is the filter window ending at k,
// so the filter's centre lies two nappes earlier.
//
// Latency 2 cycles, one voxel per cycle, any gaps between voxels allowed;
// voxels of a nappe must all arrive before the next nappe starts and nappes
// must arrive in order starting from 0.
// The absolute value, the length-5 FIR and the five-nappe circular buffer
// follow the published design; the coefficients (binomial 1,4,6,4,1 / 16) are
// this design's choice.
module demodulator
  import us_pkg::*;
#(
  parameter int N_THETA = 64,
  parameter int N_PHI   = 64,
  parameter int IN_W    = 26,
  parameter int H [5]   = '{1, 4, 6, 4, 1},
  parameter int H_SHIFT = 4,
  localparam int N_LINES = N_THETA * N_PHI,
  localparam int LA_W    = $clog2(N_LINES)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  voxel_tag_t             in_tag,
  input  logic signed [IN_W-1:0] in_data,
  output logic                   out_valid,
  output voxel_tag_t             out_tag,
  output logic [IN_W-1:0]        out_data,
  output logic                   out_partial
);
  localparam int TAPS = 5;
  localparam int ACC_W = IN_W + 8;

  logic [LA_W-1:0] line;
  logic [2:0]      slot_q, slot_now;
  logic [IN_W-1:0] mag;

  always_comb begin
    line = LA_W'(int'(in_tag.phi) * N_THETA + int'(in_tag.theta));
    mag  = in_data[IN_W-1] ? IN_W'(-in_data) : IN_W'(in_data);
    if (line == '0 && in_tag.nappe == '0) slot_now = '0;
    else if (line == '0)                  slot_now = (slot_q == 3'd4) ? 3'd0 : slot_q + 3'd1;
    else                                  slot_now = slot_q;
  end

  // Stage 1: write |x| into the slot of this nappe, read the other four.
  logic            v1;
  voxel_tag_t      t1;
  logic [2:0]      s1;
  logic [IN_W-1:0] mag1;
  logic [IN_W-1:0] rd [TAPS];

  for (genvar b = 0; b < TAPS; b++) begin : g_ring
    logic [IN_W-1:0] mem [N_LINES];
    always_ff @(posedge clk) begin
      if (in_valid && slot_now == 3'(b)) mem[line] <= mag;
      rd[b] <= mem[line];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot_q <= '0;
      v1     <= 1'b0;
      t1     <= '0;
      s1     <= '0;
      mag1   <= '0;
    end else begin
      if (in_valid) slot_q <= slot_now;
      v1   <= in_valid;
      t1   <= in_tag;
      s1   <= slot_now;
      mag1 <= mag;
    end
  end

  // Stage 2: FIR over the five nappes.
  logic [ACC_W-1:0] acc;
  always_comb begin
    acc = ACC_W'(H[0]) * ACC_W'(mag1);
    for (int m = 1; m < TAPS; m++) begin
      if (int'(t1.nappe) >= m)
        acc += ACC_W'(H[m]) * ACC_W'(rd[(int'(s1) + TAPS - m) % TAPS]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid   <= 1'b0;
      out_tag     <= '0;
      out_data    <= '0;
      out_partial <= 1'b0;
    end else begin
      out_valid   <= v1;
      out_tag     <= t1;
      out_data    <= IN_W'(acc >> H_SHIFT);
      out_partial <= int'(t1.nappe) < TAPS - 1;
    end
  end
endmodule
