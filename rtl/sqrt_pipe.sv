// sqrt_pipe: fully pipelined integer square root, one result per clock.
//
// root = floor(sqrt(radicand)). The radicand has IN_W bits (IN_W even) and the
// root IN_W/2 bits. It uses the digit-by-digit (restoring) method: each of the
// IN_W/2 stages brings down two radicand bits, tries to subtract (4*root + 1)
// from the partial remainder and produces one root bit. Every stage is
// registered, so the latency is IN_W/2 cycles and a new radicand can enter on
// every cycle. A TAG_W-bit tag and a valid bit travel with each operand.
//
// The beamformer this belongs to computes its square roots with a vendor
// CORDIC core; only its function (a square root per reference distance,
// streamed) is specified, so this design uses the simplest exact pipelined
// square root instead.
module sqrt_pipe #(
  parameter int IN_W  = 36,
  parameter int TAG_W = 10
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic [IN_W-1:0]       in_rad,
  input  logic [TAG_W-1:0]      in_tag,
  output logic                  out_valid,
  output logic [IN_W/2-1:0]     out_root,
  output logic [TAG_W-1:0]      out_tag
);
  localparam int OUT_W = IN_W / 2;
  localparam int REM_W = OUT_W + 2;

  typedef struct packed {
    logic              valid;
    logic [IN_W-1:0]   rad;   // radicand bits not yet consumed, MSB-aligned
    logic [REM_W-1:0]  rem;   // partial remainder
    logic [OUT_W-1:0]  root;  // partial root
    logic [TAG_W-1:0]  tag;
  } stage_t;

  stage_t st [OUT_W+1];

  always_comb begin
    st[0]       = '0;
    st[0].valid = in_valid;
    st[0].rad   = in_rad;
    st[0].tag   = in_tag;
  end

  for (genvar k = 0; k < OUT_W; k++) begin : g_stage
    logic [REM_W+1:0] rem_shift;
    logic [REM_W+1:0] trial;
    always_comb begin
      rem_shift = {st[k].rem, st[k].rad[IN_W-1 -: 2]};
      trial     = {2'b00, st[k].root, 2'b01};
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        st[k+1] <= '0;
      end else begin
        st[k+1].valid <= st[k].valid;
        st[k+1].tag   <= st[k].tag;
        st[k+1].rad   <= st[k].rad << 2;
        if (rem_shift >= trial) begin
          st[k+1].rem  <= REM_W'(rem_shift - trial);
          st[k+1].root <= {st[k].root[OUT_W-2:0], 1'b1};
        end else begin
          st[k+1].rem  <= REM_W'(rem_shift);
          st[k+1].root <= {st[k].root[OUT_W-2:0], 1'b0};
        end
      end
    end
  end

  assign out_valid = st[OUT_W].valid;
  assign out_root  = st[OUT_W].root;
  assign out_tag   = st[OUT_W].tag;
endmodule
