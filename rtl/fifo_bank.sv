// fifo_bank: all feedback FIFOs of the four super stages in one shared store.
//
// A single-path delay-feedback FFT of N points needs N-1 words of feedback
// storage in total, however the radices are arranged, but the length of each
// individual FIFO changes with the transform size and the radix mode of each
// super stage. Instead of giving every stage its worst-case FIFOs, all the
// storage is pooled in one DEPTH-word array and handed out per
// configuration: the scheduling logic here places the NCH chains one after
// the other, chain i occupying words base[i] .. base[i]+len[i]-1 with
// base[i] = len[0] + ... + len[i-1], so the chains never overlap as long as
// the lengths add up to at most DEPTH. Chain i is a circular delay line: every
// cycle it returns the word at base[i]+ptr[i] on rd[i] and overwrites it with
// wr[i], then ptr[i] steps modulo len[i]; a word written in cycle t is read
// back in cycle t+len[i]. len[i] = 0 switches the chain off.
//
// Reads are combinational (the store behaves as flip-flops or an
// asynchronous-read register file). The document pools the FIFOs in a bank of
// foundry SRAMs and flip-flops under a scheme it calls FIFO-SS; the contiguous
// placement rule is this design's own, as that scheme's details are not given.
module fifo_bank
  import fft_pkg::*;
#(
  parameter int unsigned DEPTH = NMAX,
  parameter int unsigned NCH   = NCHAIN
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [CW-1:0] len [NCH],
  input  cplx_t         wr  [NCH],
  output cplx_t         rd  [NCH],
  output logic          overflow   // the lengths add up to more than DEPTH
);
  localparam int unsigned BW = $clog2(DEPTH + 1) + 4;

  cplx_t         mem [DEPTH];
  logic [BW-1:0] base [NCH];
  logic [CW-1:0] ptr  [NCH];
  logic [BW-1:0] total;

  // FIFO scheduling: consecutive placement of the active chains
  always_comb begin
    total = '0;
    for (int i = 0; i < NCH; i++) begin
      base[i] = total;
      total   = total + BW'(len[i]);
    end
    overflow = (total > BW'(DEPTH));
  end

  // a pointer left over from a longer chain of the previous size restarts at 0
  logic [CW-1:0] pe [NCH];
  always_comb
    for (int i = 0; i < NCH; i++) pe[i] = (ptr[i] < len[i]) ? ptr[i] : '0;

  for (genvar i = 0; i < NCH; i++) begin : g_rd
    logic [BW-1:0] addr;
    assign addr  = base[i] + BW'(pe[i]);
    assign rd[i] = (len[i] != '0 && addr < BW'(DEPTH)) ? mem[addr[$clog2(DEPTH)-1:0]] : '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NCH; i++) ptr[i] <= '0;
    end else begin
      for (int i = 0; i < NCH; i++)
        ptr[i] <= (pe[i] + 1'b1 >= len[i]) ? '0 : pe[i] + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    for (int i = 0; i < NCH; i++) begin
      logic [BW-1:0] a;
      a = base[i] + BW'(pe[i]);
      if (len[i] != '0 && a < BW'(DEPTH)) mem[a[$clog2(DEPTH)-1:0]] <= wr[i];
    end
  end
endmodule
