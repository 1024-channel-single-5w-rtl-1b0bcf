// tb_ref_delay_engine: computes the tables of several nappes of a 4 x 2
// probe, alternating buffers, and compares every entry with the model
// r + sqrt(r^2 + x^2 + y^2); checks that busy lasts N_EL + 19 cycles and that
// the other buffer is left untouched.
module tb_ref_delay_engine;
  import us_pkg::*;
  import bf_model_pkg::*;
  localparam int NX = 4, NY = 2, NEL = NX * NY;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  logic [DIST_W-1:0] cfg_r0 = 16'd160, cfg_dr = 16'd37;   // 10.0 and 2.3125 samples
  logic [COEF_W-1:0] cfg_pitch_h = 16'd400;              // 1.5625 samples
  logic calc_start = 0;
  logic [NAPPE_W-1:0] calc_nappe = '0;
  logic busy;
  logic [REF_W-1:0] ref_tab [2][NEL];
  logic [REF_W-1:0] keep [NEL];
  int checks = 0, failures = 0;

  ref_delay_engine #(.N_X(NX), .N_Y(NY)) dut (.*);

  always #5 clk = ~clk;

  task automatic run(int n);
    int b, dur;
    b = n % 2;
    for (int e = 0; e < NEL; e++) keep[e] = ref_tab[1-b][e];
    @(negedge clk);
    calc_start = 1;
    calc_nappe = NAPPE_W'(n);
    @(negedge clk);
    calc_start = 0;
    dur = 0;
    while (busy) begin
      @(negedge clk);
      dur++;
    end
    checks++;
    if (dur != NEL + SQRT_IN_W / 2 + 1) begin
      failures++;
      $display("FAIL busy for %0d cycles", dur);
    end
    for (int e = 0; e < NEL; e++) begin
      longint r, expv;
      r = longint'(cfg_r0) + longint'(n) * longint'(cfg_dr);
      expv = ref_delay(r, longint'(cfg_pitch_h), e % NX, e / NX, NX, NY);
      checks += 2;
      if (longint'(ref_tab[b][e]) != expv) begin
        failures++;
        $display("FAIL nappe %0d el %0d got %0d exp %0d", n, e, ref_tab[b][e], expv);
      end
      if (n > 1 && ref_tab[1-b][e] != keep[e]) begin
        failures++;
        $display("FAIL other buffer changed");
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 6; n++) run(n);
    cfg_pitch_h = 16'd4000;
    cfg_r0 = 16'd3;
    run(100);
    run(7);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
