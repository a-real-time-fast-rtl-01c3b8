// memory_switch: double data memory with sampler/system bus multiplexing.
//
// Two sample_ram memories are held. At any time one of them is on the
// sampler bus (write only) and the other on the bidirectional system bus, so
// that the sampler can store new samples while the FFT works in place on the
// previous block. A pulse on swap (control line CKM) toggles the "2/1" line
// and exchanges the two memories. After reset memory 0 is on the system bus
// and memory 1 on the sampler bus (reset state is this design's choice).
// In the analyser rst_n is the power-on reset, not the master reset.
// Tristate buses are replaced by multiplexers.
// Timing: reads are combinational, writes happen at the clock edge, and a
// swap takes effect at the edge where it is sampled. An assertion checks
// that swap never comes in the same clock as a system write.
module memory_switch
  import fft_pkg::*;
#(
  parameter int unsigned LOG2N = 10
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             swap,        // CKM: exchange the memories
  output logic             sys_sel,     // memory on the system bus (2/1 line)
  // sampler bus (write only)
  input  logic [LOG2N-1:0] smp_addr,
  input  logic             smp_we,
  input  cword_t           smp_wdata,
  // system bus
  input  logic [LOG2N-1:0] sys_addr,
  input  logic             sys_we,
  input  cword_t           sys_wdata,
  output cword_t           sys_rdata
);

  logic [LOG2N-1:0] addr [2];
  logic             we   [2];
  cword_t           wdat [2];
  cword_t           rdat [2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     sys_sel <= 1'b0;
    else if (swap)  sys_sel <= ~sys_sel;
  end

  // Rule for the controller: memories are changed over only between
  // accesses, never in the clock of a system write.
  always_ff @(posedge clk) begin
    assert (!(swap && sys_we)) else $error("memory_switch: swap during a write");
  end

  always_comb begin
    for (int i = 0; i < 2; i++) begin
      if (sys_sel == 1'(i)) begin
        addr[i] = sys_addr;
        we[i]   = sys_we;
        wdat[i] = sys_wdata;
      end else begin
        addr[i] = smp_addr;
        we[i]   = smp_we;
        wdat[i] = smp_wdata;
      end
    end
  end

  assign sys_rdata = rdat[sys_sel];

  for (genvar g = 0; g < 2; g++) begin : g_mem
    sample_ram #(.LOG2N(LOG2N)) u_ram (
      .clk  (clk),
      .addr (addr[g]),
      .we   (we[g]),
      .wdata(wdat[g]),
      .rdata(rdat[g])
    );
  end

endmodule
