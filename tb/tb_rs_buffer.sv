// tb_rs_buffer: fills the three codeword banks with random symbols, reads
// every location back, then overwrites one bank while reading the others.
module tb_rs_buffer;
  import tb_gf_pkg::*;
  localparam int N = 255, BANKS = 3;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic we;
  logic [1:0] wbank, rbank;
  logic [7:0] widx, ridx;
  sym_t wdata, rdata;
  sym_t model [BANKS][N];
  int checks = 0, failures = 0;

  rs_buffer dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(int b, int i, sym_t d);
    @(negedge clk);
    we = 1'b1; wbank = 2'(b); widx = 8'(i); wdata = d;
    model[b][i] = d;
    @(negedge clk);
    we = 1'b0;
  endtask

  task automatic rd_check(int b, int i);
    rbank = 2'(b); ridx = 8'(i);
    #1;
    checks++;
    if (rdata != model[b][i]) begin
      failures++;
      if (failures < 10) $display("FAIL bank %0d index %0d: %02h expected %02h", b, i, rdata, model[b][i]);
    end
  endtask

  initial begin
    we = 1'b0; wbank = '0; widx = '0; wdata = '0; rbank = '0; ridx = '0;
    for (int b = 0; b < BANKS; b++)
      for (int i = 0; i < N; i++) wr(b, i, sym_t'($urandom));
    for (int b = 0; b < BANKS; b++)
      for (int i = 0; i < N; i++) rd_check(b, i);
    for (int i = 0; i < N; i++) begin
      wr(1, i, sym_t'($urandom));
      rd_check(0, $urandom_range(0, N - 1));
      rd_check(2, $urandom_range(0, N - 1));
      rd_check(1, i);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
