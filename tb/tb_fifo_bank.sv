// tb_fifo_bank: checks the shared FIFO bank as a set of delay lines.
//
// Several random chain layouts are loaded (16 chains, some switched off,
// lengths adding up to at most 2048, including layouts that use exactly 2047
// words as the largest transform does). Every cycle each active chain is fed a
// word that names the chain and the cycle; the word read back must be the one
// written exactly len cycles earlier, checked against a model kept here as a
// history per chain. Words are only checked once the chain has been written
// len times since the layout changed. A layout that needs more than 2048
// words must raise overflow; a fitting one must not.
module tb_fifo_bank;
  import fft_pkg::*;

  localparam int NCH = 16;

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic [CW-1:0] len [NCH];
  cplx_t         wr  [NCH];
  cplx_t         rd  [NCH];
  logic          overflow;

  fifo_bank dut (.clk, .rst_n, .len, .wr, .rd, .overflow);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  cplx_t hist [NCH][$];   // words written since the layout changed, oldest first

  task automatic layout(input int total, input int nact);
    int rest;
    rest = total;
    for (int i = 0; i < NCH; i++) len[i] = '0;
    for (int k = 0; k < nact; k++) begin
      int i, l;
      do i = $urandom_range(NCH - 1); while (len[i] != 0);
      l = (k == nact - 1) ? rest : $urandom_range(1, rest - (nact - 1 - k));
      len[i] = CW'(l);
      rest  -= l;
    end
    for (int i = 0; i < NCH; i++) hist[i].delete();
  endtask

  task automatic run(input int cycles);
    for (int c = 0; c < cycles; c++) begin
      for (int i = 0; i < NCH; i++) begin
        wr[i].re = 16'(i);
        wr[i].im = 16'($urandom);
      end
      #1;
      for (int i = 0; i < NCH; i++) begin
        int hs, li;
        hs = hist[i].size();
        li = int'(len[i]);
        if (li != 0 && hs >= li) begin
          cplx_t want;
          want = hist[i][hs - li];
          checks++;
          if (rd[i] !== want) begin
            failures++;
            if (failures < 10)
              $display("MISMATCH chain %0d len %0d: got %h want %h", i, len[i], rd[i], want);
          end
        end
      end
      @(negedge clk);
      for (int i = 0; i < NCH; i++) begin
        hist[i].push_back(wr[i]);
        if (hist[i].size() > 2100) void'(hist[i].pop_front());
      end
    end
  endtask

  initial begin
    for (int i = 0; i < NCH; i++) begin len[i] = '0; wr[i] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // layouts: totals and number of active chains
    layout(2047, 11); run(4500);   // like N = 2048: 11 radix-2 chains
    checks++; if (overflow) begin failures++; $display("false overflow"); end
    layout(2047, 16); run(4500);
    layout(971, 10);  run(2500);
    layout(3, 3);     run(50);
    layout(2048, 4);  run(4500);
    checks++; if (overflow) begin failures++; $display("false overflow at 2048"); end
    layout(2100, 5);
    #1;
    checks++; if (!overflow) begin failures++; $display("overflow not flagged"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
