// lcd_model: behavioural model of an HD44780-style character LCD, for
// testbenches only. A write (rw = 0) is taken on the falling edge of e.
// Commands: 0x01 clears the line and homes the address, 0x02 homes it,
// 0x80|a sets the address; other commands are only counted. Data writes
// store the byte at the address and advance it. After every write the
// model reports busy on the busy output for BUSY_CYCLES clock cycles.
// line[i] is character i of the first line; line_writes counts completed
// 16-character rewrites (a data write to position 15).
module lcd_model #(
  parameter int BUSY_CYCLES = 40
) (
  input  logic       clk,
  input  logic       e,
  input  logic       rw,
  input  logic       rs,
  input  logic [7:0] data,
  output logic       busy,
  output logic [7:0] line [16],
  output int         commands,
  output int         line_writes,
  output int         busy_reads
);

  logic       e_q;
  logic [6:0] addr;
  int         busy_cnt;

  initial begin
    e_q = 0; addr = 0; busy_cnt = 0; commands = 0; line_writes = 0; busy_reads = 0;
    foreach (line[i]) line[i] = 8'h20;
  end

  assign busy = (busy_cnt != 0);

  always @(posedge clk) begin
    e_q <= e;
    if (busy_cnt != 0) busy_cnt <= busy_cnt - 1;
    if (e_q && !e && rw) busy_reads <= busy_reads + 1;
    if (e_q && !e && !rw) begin
      busy_cnt <= BUSY_CYCLES;
      if (!rs) begin
        commands <= commands + 1;
        if (data[7])            addr <= data[6:0];
        else if (data == 8'h01) begin
          addr <= 0;
          foreach (line[i]) line[i] <= 8'h20;
        end else if (data == 8'h02) addr <= 0;
      end else begin
        if (addr < 16) line[addr[3:0]] <= data;
        if (addr == 15) line_writes <= line_writes + 1;
        addr <= addr + 1;
      end
    end
  end

endmodule
