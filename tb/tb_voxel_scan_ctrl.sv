// tb_voxel_scan_ctrl: drives the controller with a model of the reference
// engine whose table takes CALC cycles. First with CALC longer than a nappe
// (the scan must stall), then shorter (no gap between nappes). Checks the
// voxel order, that each nappe is issued only after its table is complete,
// the number of cycles per volume and the done pulse.
module tb_voxel_scan_ctrl;
  import us_pkg::*;
  localparam int NT = 3, NP = 2, NN = 5, NL = NT * NP;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  logic start = 0;
  logic busy, done, stall, calc_busy, calc_start, vox_valid;
  logic [NAPPE_W-1:0] calc_nappe;
  voxel_tag_t vox_tag;
  int calc = 10;
  int cnt = 0;
  int ready_upto = -1;     // highest nappe whose table is complete
  logic [NAPPE_W-1:0] pending;
  int checks = 0, failures = 0, stalls = 0, cycles = 0, voxels = 0, dones = 0;
  int exp_idx = 0;

  voxel_scan_ctrl #(.N_THETA(NT), .N_PHI(NP), .N_NAPPE(NN)) dut (.*);

  always #5 clk = ~clk;

  // Model of the reference-delay engine.
  assign calc_busy = (cnt != 0);
  always @(posedge clk) begin
    if (calc_start) begin
      if (cnt != 0) begin failures++; $display("FAIL request while busy"); end
      cnt <= calc;
      pending <= calc_nappe;
    end else if (cnt > 1) cnt <= cnt - 1;
    else if (cnt == 1) begin
      cnt <= 0;
      ready_upto <= int'(pending);
    end
  end

  always @(posedge clk) begin
    if (busy) cycles++;
    if (stall) stalls++;
    if (done) dones++;
    if (vox_valid) begin
      voxels++;
      checks++;
      if (int'(vox_tag.theta) != exp_idx % NT || int'(vox_tag.phi) != (exp_idx / NT) % NP ||
          int'(vox_tag.nappe) != exp_idx / NL || int'(vox_tag.nappe) > ready_upto) begin
        failures++;
        $display("FAIL voxel %0d tag %0d/%0d/%0d ready %0d", exp_idx, vox_tag.nappe, vox_tag.phi,
                 vox_tag.theta, ready_upto);
      end
      exp_idx++;
    end
  end

  task automatic volume(int c, bit expect_stall);
    calc = c;
    voxels = 0; stalls = 0; cycles = 0; dones = 0; exp_idx = 0; ready_upto = -1;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    while (busy) @(negedge clk);
    @(negedge clk);   // done is registered: it follows the last voxel by one cycle
    checks += 3;
    if (voxels != NN * NL || dones != 1) begin failures++; $display("FAIL count"); end
    if (expect_stall ? (stalls == 0) : (stalls != 0)) begin
      failures++; $display("FAIL stalls %0d", stalls);
    end
    // Without stalls: one wait for the first table, then one voxel per cycle.
    if (!expect_stall && cycles != c + 1 + NN * NL) begin
      failures++; $display("FAIL cycles %0d", cycles);
    end
    $display("volume calc=%0d cycles=%0d stalls=%0d", c, cycles, stalls);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    volume(10, 1'b1);
    volume(3, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
