// tb_memory_switch: the sampler fills one memory while the system side
// writes and reads the other; after each swap the system side must see what
// the sampler wrote, and the sampler's writes must never reach the memory on
// the system bus.
// Runs at N = 64 with a 100-unit clock, inputs on the falling edge. The
// double-memory scheme follows the original; the reset selection is this
// design's.
module tb_memory_switch;
  import fft_pkg::*;
  localparam int unsigned LOG2N = 6;
  localparam int unsigned N = 2 ** LOG2N;
  logic clk = 0, rst_n = 0, swap = 0, sys_sel;
  logic [LOG2N-1:0] smp_addr = '0, sys_addr = '0;
  logic smp_we = 0, sys_we = 0;
  cword_t smp_wdata = '0, sys_wdata = '0, sys_rdata;
  cword_t m_smp [N], m_sys [N];
  int checks = 0, failures = 0;

  memory_switch #(.LOG2N(LOG2N)) dut (.*);
  always #50 clk = ~clk;

  initial begin
    repeat (20000) @(negedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int round = 0; round < 4; round++) begin
      // both sides write at the same time
      for (int a = 0; a < N; a++) begin
        smp_addr = LOG2N'(a); smp_wdata = cword_t'($urandom); smp_we = 1;
        sys_addr = LOG2N'(N - 1 - a); sys_wdata = cword_t'($urandom); sys_we = 1;
        m_smp[a] = smp_wdata; m_sys[N - 1 - a] = sys_wdata;
        @(negedge clk);
      end
      smp_we = 0; sys_we = 0;
      // the system side sees only its own writes
      for (int a = 0; a < N; a++) begin
        sys_addr = LOG2N'(a); #1;
        checks++;
        if (sys_rdata != m_sys[a]) begin failures++; if (failures < 4) $display("sys a=%0d got %h want %h r=%0d", a, sys_rdata, m_sys[a], round); end
      end
      checks++;
      if (sys_sel != 1'(round & 1)) failures++;
      @(negedge clk);
      swap = 1; @(negedge clk); swap = 0;
      // after the swap the system side sees the sampled block
      for (int a = 0; a < N; a++) begin
        sys_addr = LOG2N'(a); #1;
        checks++;
        if (sys_rdata != m_smp[a]) begin failures++; if (failures < 4) $display("smp a=%0d got %h want %h r=%0d", a, sys_rdata, m_smp[a], round); end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
