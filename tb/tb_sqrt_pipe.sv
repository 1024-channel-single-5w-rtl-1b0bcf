// tb_sqrt_pipe: random and corner radicands against a bisection square root;
// checks the result, the tag and the IN_W/2-cycle latency.
module tb_sqrt_pipe;
  import bf_model_pkg::*;
  localparam int IN_W = 36;
  localparam int LAT  = IN_W / 2;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  logic in_valid = 0;
  logic [IN_W-1:0] in_rad = '0;
  logic [9:0] in_tag = '0;
  logic out_valid;
  logic [IN_W/2-1:0] out_root;
  logic [9:0] out_tag;
  int checks = 0, failures = 0;
  longint unsigned sent [1024];
  int sent_cyc [1024];
  int cyc = 0;

  sqrt_pipe #(.IN_W(IN_W), .TAG_W(10)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (out_valid) begin
    longint unsigned exp_root;
    exp_root = isqrt(sent[out_tag]);
    checks++;
    if (64'(out_root) != exp_root || cyc - sent_cyc[out_tag] != LAT) begin
      failures++;
      $display("FAIL rad=%0d root=%0d exp=%0d lat=%0d", sent[out_tag], out_root, exp_root,
               cyc - sent_cyc[out_tag]);
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 600; k++) begin
      @(negedge clk);
      in_valid = 1;
      in_tag   = 10'(k);
      case (k)
        0: in_rad = '0;
        1: in_rad = '1;
        2: in_rad = 36'd1;
        3: in_rad = 36'd4;
        4: in_rad = 36'd99;
        default: in_rad = (k % 3 == 0) ? IN_W'({$urandom, $urandom}) : IN_W'($urandom % 100000);
      endcase
      sent[k] = 64'(in_rad);
      sent_cyc[k] = cyc;
      if (k % 50 == 7) begin
        @(negedge clk);
        in_valid = 0;
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (LAT + 5) @(posedge clk);
    if (checks != 600) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
