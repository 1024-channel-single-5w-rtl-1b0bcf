// tb_echo_store: loads 8 channels x 32 samples, then reads every channel at
// its own random index each cycle; checks the samples one cycle later.
module tb_echo_store;
  localparam int NCH = 8, S = 32;
  logic clk = 0;
  logic wr_en = 0;
  logic [2:0] wr_ch = '0;
  logic [4:0] wr_addr = '0;
  logic [15:0] wr_data = '0;
  logic [4:0] rd_addr [NCH];
  logic [15:0] rd_data [NCH];
  logic [15:0] mem [NCH][S];
  int checks = 0, failures = 0;

  echo_store #(.N_CH(NCH), .SAMPLES(S), .W(16)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    for (int c = 0; c < NCH; c++) rd_addr[c] = '0;
    for (int k = 0; k < NCH * S; k++) begin
      @(negedge clk);
      wr_en = 1;
      wr_ch = 3'(k % NCH);
      wr_addr = 5'(k / NCH);
      wr_data = 16'($urandom);
      mem[k % NCH][k / NCH] = wr_data;
    end
    @(negedge clk);
    wr_en = 0;
    for (int k = 0; k < 50; k++) begin
      logic [4:0] a [NCH];
      for (int c = 0; c < NCH; c++) begin
        a[c] = 5'($urandom);
        rd_addr[c] = a[c];
      end
      @(posedge clk);
      #1;
      for (int c = 0; c < NCH; c++) begin
        checks++;
        if (rd_data[c] != mem[c][a[c]]) begin
          failures++;
          $display("FAIL ch=%0d addr=%0d", c, a[c]);
        end
      end
      @(negedge clk);
    end
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
