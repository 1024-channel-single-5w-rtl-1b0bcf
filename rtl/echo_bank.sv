// echo_bank: one dual-port block RAM shared by a pair of receive channels.
//
// The RAM holds 2*DEPTH words: channel 0 of the pair at addresses 0..DEPTH-1,
// channel 1 at DEPTH..2*DEPTH-1. Port A can write (while echoes are loaded)
// or read channel 0; port B reads channel 1. Both reads are registered (one
// cycle latency), so during beamforming each of the two channels gets its own
// delayed sample every cycle and the pair needs one RAM at full throughput.
// Sharing one dual-port RAM between two channels follows the published
// design; the address split and the port roles are this design's choices.
module echo_bank #(
  parameter int DEPTH = 1024,
  parameter int W     = 16,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  // port A: write, or read channel 0
  input  logic          a_we,
  input  logic          a_ch,      // channel of the pair addressed by port A
  input  logic [AW-1:0] a_addr,
  input  logic [W-1:0]  a_wdata,
  output logic [W-1:0]  a_rdata,
  // port B: read channel 1
  input  logic [AW-1:0] b_addr,
  output logic [W-1:0]  b_rdata
);
  logic [W-1:0] mem [2*DEPTH];

  always_ff @(posedge clk) begin
    if (a_we) mem[{a_ch, a_addr}] <= a_wdata;
    a_rdata <= mem[{a_ch, a_addr}];
  end

  always_ff @(posedge clk) begin
    b_rdata <= mem[{1'b1, b_addr}];
  end
endmodule
