// tb_despread: two stations with the codes 00001111 and 01010011 send on a
// modelled channel, chip-aligned, four samples per chip. Each opens with
// 24 one-bits and continues with random bits. For each station the decoded
// bits must be one unbroken run of the bits it sent (at least 50 of them),
// each decoded bit is compared with the sent one, the correlation at every
// decoded bit must be exactly +8 or -8, and both decoders must
// synchronize. Station 0's decoder is then told to resynchronize: it must
// drop out, synchronize again and keep decoding correctly, while station 1
// continues without a break.
`timescale 1ns/1ps
module tb_despread;
  import cdma_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic     rst_n, tick;
  sample_t  sample;
  chipseq_t cs [2];
  logic     resync [2];
  logic     bit_out [2], bit_valid [2], synced [2];
  dp_t      dp [2];

  despread #(.NST(2)) dut (.clk(clk), .rst_n(rst_n), .sample_tick(tick), .sample(sample),
    .cs(cs), .resync(resync), .bit_out(bit_out), .bit_valid(bit_valid),
    .synced(synced), .dp(dp));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  localparam int NBITS = 120;
  bit sent [2][NBITS];
  int got  [2][$];
  int got_after [$];      // station 0 bits after its resync
  bit after_resync = 0;

  always @(posedge clk) begin
    for (int k = 0; k < 2; k++)
      if (bit_valid[k]) begin
        // the two codes are orthogonal and bit-aligned here, so at the
        // chosen position the correlation is exactly +8 or -8
        check(bit_out[k] ? (dp[k] == 7'sd8) : (dp[k] == -7'sd8),
              $sformatf("station %0d: dp %0d at a decoded bit", k, dp[k]));
        got[k].push_back(int'(bit_out[k]));
        if (k == 0 && after_resync) got_after.push_back(int'(bit_out[k]));
      end
  end

  // position of the decoded run within the sent bits, -1 if it is not a run
  function automatic int find_run(input int k, input int d [$]);
    for (int o = 0; o + d.size() <= NBITS; o++) begin
      bit ok = 1;
      for (int i = 0; i < d.size(); i++)
        if (int'(sent[k][o + i]) != d[i]) begin ok = 0; break; end
      if (ok) return o;
    end
    return -1;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s, off;
    cs[0] = 8'b00001111;
    cs[1] = 8'b01010011;
    resync[0] = 0; resync[1] = 0;
    for (int b = 0; b < NBITS; b++) begin
      sent[0][b] = (b < 24) ? 1 : 1'($urandom);
      sent[1][b] = (b < 24) ? 1 : 1'($urandom);
    end
    rst_n = 0; tick = 0; sample = 0;
    repeat (3) @(posedge clk); #1;
    rst_n = 1;
    repeat (40) @(posedge clk); #1;
    for (int b = 0; b < NBITS; b++) begin
      if (b == 70) begin
        resync[0] = 1;
        @(posedge clk); #1;
        resync[0] = 0;
        check(!synced[0] && synced[1], "only station 0 drops its synchronization");
        repeat (40) @(posedge clk); #1;
        after_resync = 1;
      end
      for (int c = 0; c < CHIPS; c++)
        for (int o = 0; o < OVERSAMPLE; o++) begin
          s = 0;
          for (int k = 0; k < 2; k++)
            s += (sent[k][b] ~^ cs[k][c]) ? 1 : -1;
          sample = sample_t'(s);
          tick = 1;
          @(posedge clk); #1;
          tick = 0;
          repeat (7) @(posedge clk);
          #1;
        end
    end
    repeat (20) @(posedge clk);
    check(synced[0] && synced[1], "both stations synchronized");
    check(got[1].size() >= 90, $sformatf("station 1 decoded %0d bits", got[1].size()));
    off = find_run(1, got[1]);
    check(off >= 0, "station 1 bits are an unbroken run of what it sent");
    if (off >= 0)
      foreach (got[1][i]) check(got[1][i] == int'(sent[1][off + i]), $sformatf("station 1 bit %0d", i));
    check(got_after.size() >= 25, $sformatf("station 0 decoded %0d bits after resync", got_after.size()));
    check(find_run(0, got_after) >= 70, "station 0 decodes correctly after resync");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
