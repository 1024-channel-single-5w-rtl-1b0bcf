// echo_store: echo memory of all receive channels, N_CH/2 dual-port banks.
//
// Channels 2p and 2p+1 share bank p (echo_bank). Loading writes one sample per
// cycle through port A of the addressed bank. During beamforming every
// channel presents its own sample index (its delay for the current voxel) and
// receives that sample one cycle later: channel 2p through port A, channel
// 2p+1 through port B. A load has priority over the port-A read of its bank;
// loading and beamforming are not meant to overlap.
// Pairing channels on dual-port RAMs follows the published design (512 RAMs
// for 1024 channels); the load port is this design's choice.
module echo_store #(
  parameter int N_CH    = 1024,
  parameter int SAMPLES = 1024,
  parameter int W       = 16,
  localparam int AW     = $clog2(SAMPLES),
  localparam int CH_W   = $clog2(N_CH)
) (
  input  logic            clk,
  input  logic            wr_en,
  input  logic [CH_W-1:0] wr_ch,
  input  logic [AW-1:0]   wr_addr,
  input  logic [W-1:0]    wr_data,
  input  logic [AW-1:0]   rd_addr [N_CH],
  output logic [W-1:0]    rd_data [N_CH]
);
  for (genvar p = 0; p < N_CH / 2; p++) begin : g_bank
    logic          we;
    logic          a_ch;
    logic [AW-1:0] a_addr;
    always_comb begin
      we     = wr_en && (wr_ch[CH_W-1:1] == (CH_W-1)'(p));
      a_ch   = we ? wr_ch[0] : 1'b0;
      a_addr = we ? wr_addr : rd_addr[2*p];
    end
    echo_bank #(.DEPTH(SAMPLES), .W(W)) u_bank (
      .clk     (clk),
      .a_we    (we),
      .a_ch    (a_ch),
      .a_addr  (a_addr),
      .a_wdata (wr_data),
      .a_rdata (rd_data[2*p]),
      .b_addr  (rd_addr[2*p+1]),
      .b_rdata (rd_data[2*p+1])
    );
  end
endmodule
