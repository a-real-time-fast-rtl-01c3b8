// tb_address_generator: compares the butterfly operand addresses, W^P
// counter steps and array/done status with a nested-loop model of the
// decimation-in-time FFT (span N/2, N/4, ... 1), and the bit-reversed n,
// N-n and straight sequences with directly computed addresses.
// Runs at N = 1024 with a 100-unit clock; inputs change on the falling edge.
// The sequences follow the original address generator; the model is an
// independent loop formulation of the same FFT.
module tb_address_generator;
  import fft_pkg::*;
  localparam int unsigned LOG2N = 10;
  localparam int unsigned N = 2 ** LOG2N;

  logic clk = 0, rst_n = 0, clr = 0, inc = 0, ab = 0;
  ag_mode_e mode = AG_FFT;
  logic [LOG2N-1:0] addr;
  logic [LOG2N-2:0] count;
  logic [$clog2(LOG2N)-1:0] array_idx;
  logic carry, w_adv, w_clr, fft_done;
  int checks = 0, failures = 0;
  int wcnt = 0;

  address_generator #(.LOG2N(LOG2N)) dut (.*);

  always #50 clk = ~clk;

  // W^P counter model driven by the generator's strobes
  always_ff @(posedge clk) begin
    if (w_clr) wcnt <= 0;
    else if (w_adv) wcnt <= wcnt + 1;
  end

  initial begin
    repeat (400000) @(negedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int bitrev(int k);
    int r = 0;
    for (int i = 0; i < LOG2N; i++) if (k & (1 << i)) r |= 1 << (LOG2N - 1 - i);
    return r;
  endfunction

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    int span, a, b, k, nb;
    repeat (2) @(negedge clk);
    rst_n = 1;
    clr = 1; @(negedge clk); clr = 0;
    mode = AG_FFT;
    nb = 0;
    for (int r = 0; r < LOG2N; r++) begin
      span = N >> (r + 1);
      for (int base = 0; base < N; base += 2 * span) begin
        for (int i = 0; i < span; i++) begin
          a = base + i;
          b = a + span;
          k = base / (2 * span);
          ab = 0; #1;
          chk(int'(addr) == a, "A address");
          chk(wcnt == k, "W index");
          chk(int'(array_idx) == r, "array");
          ab = 1; #1;
          chk(int'(addr) == b, "B address");
          chk(carry == 0, "no carry before inc");
          inc = 1; #1;
          chk(carry == ((i == span - 1) && (base + 2 * span == N)), "carry");
          @(negedge clk);
          inc = 0;
          nb++;
        end
      end
    end
    #1 chk(fft_done == 1, "fft_done after all arrays");
    chk(nb == LOG2N * N / 2, "butterfly count");
    chk(wcnt == 0, "W counter cleared at array end");
    // bit-reversed n and N-n, straight
    clr = 1; @(negedge clk); clr = 0;
    #1 chk(fft_done == 0, "clr clears done");
    for (int n = 0; n < N; n++) begin
      ab = (n >= N / 2);
      mode = AG_BITREV_N; #1 chk(int'(addr) == bitrev(n), "bitrev n");
      mode = AG_BITREV_M; #1 chk(int'(addr) == bitrev((N - n) % N), "bitrev N-n");
      mode = AG_STRAIGHT; #1 chk(int'(addr) == n, "straight");
      inc = 1; #1 chk(carry == ((n % (N / 2)) == N / 2 - 1), "carry n");
      @(negedge clk);
      inc = 0;
      #1 chk(w_adv == 0 && fft_done == 0, "no W step / done outside FFT");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
