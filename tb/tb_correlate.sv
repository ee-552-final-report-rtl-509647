// tb_correlate: drives the dot product directly, as a function of the
// sample-tick number, and checks the synchronizer and decoder.
//   - after reset all 32 tally words are cleared;
//   - sync: position P sees dp = +8 every period, the other positions see
//     values within +/-6 (never good) except position P+1, which is good in
//     every other period; synced must rise exactly on the 15th good decode
//     at P, DELAY+1 cycles after that tick;
//   - decode: dp at P of +8, -8, 0, +7, -7, +6, -6 must give bits 1, 0,
//     none, 1, 0, none, none, each as a one-cycle pulse, and nothing at
//     other positions;
//   - resync restarts; a second sync at another position works.
`timescale 1ns/1ps
module tb_correlate;
  import cdma_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, resync, tick;
  dp_t  dp;
  logic bit_out, bit_valid, synced;

  correlate dut (.clk(clk), .rst_n(rst_n), .resync(resync), .sample_tick(tick),
                 .dp(dp), .bit_out(bit_out), .bit_valid(bit_valid), .synced(synced));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  int tick_no;          // ticks since the sync phase started
  int P;
  int dec_vals [7] = '{8, -8, 0, 7, -7, 6, -6};
  int dec_idx;
  int bits_seen [$];
  int valid_len;
  int off_pos_bits;

  // one tick every 12 cycles; dp is set together with the tick
  task automatic do_tick(input int value);
    dp   = dp_t'(value);
    tick = 1;
    @(posedge clk); #1;
    tick = 0;
    repeat (11) @(posedge clk);
    #1;
  endtask

  always @(posedge clk) begin
    if (bit_valid) begin
      valid_len++;
      bits_seen.push_back(int'(bit_out));
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pos, good_at_p, rise_tick;
    rst_n = 0; resync = 0; tick = 0; dp = 0;
    repeat (2) @(posedge clk); #1;
    rst_n = 1;
    repeat (40) @(posedge clk); #1;
    for (int a = 0; a < 32; a++) check(dut.u_ram.mem[a] == 0, "tally cleared");

    // ---- sync at position P
    P = 9;
    good_at_p = 0;
    rise_tick = -1;
    for (tick_no = 0; tick_no < 32 * 20 && rise_tick < 0; tick_no++) begin
      pos = (tick_no + 1) % 32;   // the FSM advances its address on each tick
      if (pos == P) begin
        do_tick(8);
        good_at_p++;
      end else if (pos == P + 1 && (tick_no / 32) % 2 == 0) do_tick(-8);
      else do_tick($urandom_range(0, 12) - 6);
      if (synced && rise_tick < 0) rise_tick = good_at_p;
    end
    check(rise_tick == SYNC_TALLY, $sformatf("synced after %0d good decodes", rise_tick));

    // ---- decode
    bits_seen.delete();
    valid_len = 0;
    dec_idx = 0;
    for (int n = 0; n < 7 * 32; n++) begin
      pos = (n + 1) % 32;
      if (pos == 0) begin
        do_tick(dec_vals[dec_idx]);
        dec_idx++;
      end else do_tick(dec_vals[(n / 32) % 2]);   // good values at wrong positions
    end
    check(bits_seen.size() == 4, $sformatf("4 bits decoded, got %0d", bits_seen.size()));
    if (bits_seen.size() == 4)
      check(bits_seen[0] == 1 && bits_seen[1] == 0 && bits_seen[2] == 1 && bits_seen[3] == 0,
            "decoded bit values 1 0 1 0");
    check(valid_len == 4, "bit_valid lasts one cycle per bit");

    // ---- resync and a second sync at another position
    @(posedge clk); #1;
    resync = 1;
    @(posedge clk); #1;
    resync = 0;
    check(!synced, "resync drops synchronization");
    repeat (40) @(posedge clk); #1;
    P = 20;
    good_at_p = 0;
    rise_tick = -1;
    for (tick_no = 0; tick_no < 32 * 20 && rise_tick < 0; tick_no++) begin
      pos = (tick_no + 1) % 32;
      if (pos == P) begin
        do_tick(-8);
        good_at_p++;
      end else do_tick($urandom_range(0, 12) - 6);
      if (synced && rise_tick < 0) rise_tick = good_at_p;
    end
    check(rise_tick == SYNC_TALLY, "second synchronization after 15 good decodes");
    bits_seen.delete();
    for (int n = 0; n < 2 * 32; n++) do_tick(((n + 1) % 32 == 0) ? -8 : 0);
    check(bits_seen.size() == 2 && bits_seen[0] == 0 && bits_seen[1] == 0,
          "decodes zeros at the new phase");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
