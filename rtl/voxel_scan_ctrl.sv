// voxel_scan_ctrl: walks the volume one voxel per clock, nappe by nappe.
//
// The volume is N_NAPPE nappes (depths) of N_PHI x N_THETA lines of sight.
// Within a nappe theta runs fastest, then phi. Each nappe needs its
// reference-delay table, which ref_delay_engine computes into the table of
// the nappe's parity while the previous nappe is being beamformed:
//   - start: the table of nappe 0 is requested and awaited (state WAIT);
//   - when a table is ready, the table of the following nappe is requested and
//     the nappe is emitted (state RUN), N_THETA*N_PHI voxels back to back;
//   - at the last voxel of a nappe the controller continues without a gap if
//     the next table is ready, and otherwise waits (stall is high while it
//     waits for any table but the first).
// With the default sizes a nappe lasts 4096 cycles and a table takes about
// 1044, so the scan never stalls and a volume takes 64*64*600 cycles plus the
// first table. done pulses with the last voxel. A table request (calc_start)
// is only made while calc_busy is low.
// One voxel per clock and the 64 x 64 x 600 volume follow the published
// design; the nappe-major order, the handshake and the stall are this
// design's choices, needed by the nappe-wise demodulation and the per-nappe
// reference tables.
module voxel_scan_ctrl
  import us_pkg::*;
#(
  parameter int N_THETA = 64,
  parameter int N_PHI   = 64,
  parameter int N_NAPPE = 600
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  output logic               busy,
  output logic               done,
  output logic               stall,
  input  logic               calc_busy,
  output logic               calc_start,
  output logic [NAPPE_W-1:0] calc_nappe,
  output logic               vox_valid,
  output voxel_tag_t         vox_tag
);
  scan_state_e       state;
  logic [NAPPE_W-1:0] nappe;
  logic [ANG_W-1:0]   theta, phi;
  logic               first;     // waiting for the table of nappe 0
  logic               last_line;

  always_comb begin
    last_line  = (int'(theta) == N_THETA - 1) && (int'(phi) == N_PHI - 1);
    vox_valid  = (state == SCAN_RUN);
    vox_tag    = '{nappe: nappe, phi: phi, theta: theta};
    busy       = (state != SCAN_IDLE);
    stall      = (state == SCAN_WAIT) && !first;
    calc_start = 1'b0;
    calc_nappe = '0;
    case (state)
      SCAN_IDLE: if (start) begin
        calc_start = 1'b1;
        calc_nappe = '0;
      end
      SCAN_WAIT: if (!calc_busy && int'(nappe) + 1 < N_NAPPE) begin
        calc_start = 1'b1;
        calc_nappe = nappe + 1'b1;
      end
      SCAN_RUN: if (last_line && !calc_busy && int'(nappe) + 2 < N_NAPPE) begin
        calc_start = 1'b1;
        calc_nappe = nappe + NAPPE_W'(2);
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= SCAN_IDLE;
      nappe <= '0;
      theta <= '0;
      phi   <= '0;
      first <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        SCAN_IDLE: if (start) begin
          state <= SCAN_WAIT;
          nappe <= '0;
          theta <= '0;
          phi   <= '0;
          first <= 1'b1;
        end
        SCAN_WAIT: if (!calc_busy) begin
          state <= SCAN_RUN;
          first <= 1'b0;
        end
        SCAN_RUN: begin
          if (int'(theta) == N_THETA - 1) begin
            theta <= '0;
            phi   <= (int'(phi) == N_PHI - 1) ? '0 : phi + 1'b1;
          end else begin
            theta <= theta + 1'b1;
          end
          if (last_line) begin
            if (int'(nappe) == N_NAPPE - 1) begin
              state <= SCAN_IDLE;
              done  <= 1'b1;
            end else begin
              nappe <= nappe + 1'b1;
              if (calc_busy) state <= SCAN_WAIT;
            end
          end
        end
        default: state <= SCAN_IDLE;
      endcase
    end
  end
endmodule
