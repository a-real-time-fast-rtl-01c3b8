// tb_sample_ram: writes random complex words to every address, reads them
// back through the asynchronous read port, and checks that a cycle with we
// low leaves the word unchanged.
// One access per 100-unit clock, inputs on the falling edge; the memory
// size follows the original, the read timing is this design's.
module tb_sample_ram;
  import fft_pkg::*;
  localparam int unsigned LOG2N = 10;
  localparam int unsigned N = 2 ** LOG2N;
  logic clk = 0, we = 0;
  logic [LOG2N-1:0] addr = '0;
  cword_t wdata = '0, rdata;
  cword_t model [N];
  int checks = 0, failures = 0;

  sample_ram #(.LOG2N(LOG2N)) dut (.*);
  always #50 clk = ~clk;

  initial begin
    repeat (20000) @(negedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < N; a++) begin
      @(negedge clk);
      addr = LOG2N'(a); wdata = cword_t'($urandom); we = 1; model[a] = wdata;
    end
    @(negedge clk); we = 0;
    for (int a = 0; a < N; a++) begin
      addr = LOG2N'(a); wdata = cword_t'($urandom);
      @(negedge clk);
      checks++;
      if (rdata != model[a]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
