// adder_tree: pipelined N-input signed adder tree.
//
// Sums N signed IN_W-bit operands into one IN_W + clog2(N)-bit result. The
// operands are padded with zeros to the next power of two and added pairwise
// in clog2(N) levels, each level registered, so one sum leaves per cycle after
// clog2(N) cycles. A valid bit and a TAG_W-bit tag travel with the operands.
// In the beamformer it is the 1024:1 tree that turns the delayed samples of
// all channels into one voxel per clock, as published; a register on every
// level is this design's choice.
module adder_tree #(
  parameter int N     = 1024,
  parameter int IN_W  = 16,
  parameter int TAG_W = 26,
  localparam int LEVELS = (N > 1) ? $clog2(N) : 1,
  localparam int OUT_W  = IN_W + LEVELS
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic [TAG_W-1:0]        in_tag,
  input  logic signed [IN_W-1:0]  in_data [N],
  output logic                    out_valid,
  output logic [TAG_W-1:0]        out_tag,
  output logic signed [OUT_W-1:0] out_sum
);
  localparam int NP = 1 << LEVELS;

  // Heap-numbered nodes: node k (1 <= k < NP) is the registered sum of nodes
  // 2k and 2k+1; nodes NP..2NP-1 are the zero-padded operands.
  for (genvar k = 1; k < 2 * NP; k++) begin : g_node
    logic signed [OUT_W-1:0] s;
    if (k >= NP) begin : g_leaf
      if (k - NP < N) begin : g_op
        assign s = OUT_W'(in_data[k-NP]);
      end else begin : g_pad
        assign s = '0;
      end
    end else begin : g_add
      always_ff @(posedge clk) begin
        s <= g_node[2*k].s + g_node[2*k+1].s;
      end
    end
  end

  // Valid and tag follow the sums through the LEVELS register stages.
  logic             v_pipe [LEVELS];
  logic [TAG_W-1:0] t_pipe [LEVELS];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int l = 0; l < LEVELS; l++) begin
        v_pipe[l] <= 1'b0;
        t_pipe[l] <= '0;
      end
    end else begin
      v_pipe[0] <= in_valid;
      t_pipe[0] <= in_tag;
      for (int l = 1; l < LEVELS; l++) begin
        v_pipe[l] <= v_pipe[l-1];
        t_pipe[l] <= t_pipe[l-1];
      end
    end
  end

  assign out_valid = v_pipe[LEVELS-1];
  assign out_tag   = t_pipe[LEVELS-1];
  assign out_sum   = g_node[1].s;
endmodule
