// tb_encoder: loads the chip sequence 10101100 and feeds bytes whenever the
// encoder signals taken. Every chip on tx_high/tx_low is compared with a
// model: the first two byte periods after cs_load are silent, then each
// byte is sent LSB first, eight chips per bit, the chip itself for a 1 and
// its complement for a 0; a byte offered without valid is a silent period.
// Each of the 512 chips is one check.
// taken must pulse once per byte, exactly 64 chip ticks apart. After a
// reset the outputs must stay low until the next cs_load.
`timescale 1ns/1ps
module tb_encoder;
  import cdma_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic       rst_n, chip_tick, cs_load, data_valid, taken, tx_high, tx_low;
  chipseq_t   cs;
  logic [7:0] data_in;

  encoder dut (.clk(clk), .rst_n(rst_n), .chip_tick(chip_tick), .cs_load(cs_load),
               .cs(cs), .data_in(data_in), .data_valid(data_valid), .taken(taken),
               .tx_high(tx_high), .tx_low(tx_low));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  localparam int NBYTES = 6;
  logic [7:0] bytes [NBYTES] = '{8'hB5, 8'h00, 8'h5A, 8'hFF, 8'h81, 8'h3C};
  bit         bvalid [NBYTES] = '{1, 1, 1, 0, 1, 1};
  int         next_byte = 0;
  int         ticks = 0, last_taken_tick = -1, taken_count = 0, gap_bad = 0;

  // chip-rate enable: one cycle in four
  always @(posedge clk) begin
    chip_tick <= (($time / 10) % 4 == 0);
    if (chip_tick) ticks++;
  end

  // byte source: present the next byte, advance on taken
  always @(posedge clk) begin
    if (taken && rst_n) begin
      taken_count++;
      if (last_taken_tick >= 0 && ticks - last_taken_tick != 64) gap_bad++;
      last_taken_tick = ticks;
      next_byte++;
    end
  end
  always_comb begin
    data_in    = (next_byte < NBYTES) ? bytes[next_byte] : 8'h00;
    data_valid = (next_byte < NBYTES) ? bvalid[next_byte] : 1'b0;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int mism;
    logic exp_h, exp_l, b;
    rst_n = 0; cs_load = 0; cs = 8'b10101100;
    repeat (3) @(posedge clk); #1;
    rst_n = 1;
    repeat (40) @(posedge clk); #1;
    check(!tx_high && !tx_low && taken_count == 0, "idle until the chip sequence is loaded");
    @(negedge clk);
    cs_load = 1;
    @(negedge clk);
    cs_load = 0;
    mism = 0;
    // (2 + NBYTES) byte periods of 64 chips
    for (int p = 0; p < 2 + NBYTES; p++)
      for (int c = 0; c < 64; c++) begin
        @(posedge clk iff chip_tick);
        @(posedge clk); #1;
        if (p < 2 || !bvalid[p - 2]) begin
          exp_h = 0; exp_l = 0;
        end else begin
          b = bytes[p - 2][c / 8];
          exp_h = ~(b ^ cs[c % 8]);
          exp_l = ~exp_h;
        end
        check(tx_high == exp_h && tx_low == exp_l,
              $sformatf("byte period %0d chip %0d", p, c));
        if (tx_high != exp_h || tx_low != exp_l) mism++;
      end
    if (mism != 0) $display("%0d chips differ from the model", mism);
    check(taken_count >= NBYTES + 1, "taken once per byte period");
    check(gap_bad == 0, "taken every 64 chip ticks");
    rst_n = 0;
    @(posedge clk); #1;
    rst_n = 1;
    repeat (300) @(posedge clk); #1;
    check(!tx_high && !tx_low, "silent after reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
