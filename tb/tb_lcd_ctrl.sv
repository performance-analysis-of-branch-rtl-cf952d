// Testbench of the character-LCD driver, with shortened delays. A model of
// the display's 4-bit bus collects the nibbles on each falling edge of
// lcd_e and checks: the wake-up nibbles 3,3,3,2; the set-up commands 28, 0C,
// 06, 01; then, three times over, the cursor command 80 followed by the
// eight hexadecimal digits of the value input (changed between lines).
// It also checks the enable pulse width, the gap after each nibble, the
// longer gap after clear and the power-up delay.
`timescale 1ns/1ps
module tb_lcd_ctrl;
  localparam int PWR = 50, EC = 3, CMD = 10, CLR = 30;
  logic clk = 1'b0, rst = 1'b1;
  logic [31:0] value = 32'h0000_01D6;
  logic e, rs, rw;
  logic [3:0] db;
  always #5 clk = ~clk;

  lcd_ctrl #(.POWERUP_CYCLES(PWR), .E_CYCLES(EC), .CMD_CYCLES(CMD), .CLEAR_CYCLES(CLR)) dut (
    .clk(clk), .rst(rst), .value(value), .lcd_e(e), .lcd_rs(rs), .lcd_rw(rw), .lcd_db(db));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // bus timing
  int cyc = 0, rise_t = -1, fall_t = -1, last_gap_min = CMD;
  logic e_d = 1'b0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    e_d <= e;
    if (!rst && e && !e_d) begin
      if (fall_t < 0) check(cyc >= PWR, "power-up delay before first strobe");
      else check(cyc - fall_t >= last_gap_min, $sformatf("gap %0d after nibble", cyc - fall_t));
      rise_t = cyc;
      last_gap_min = CMD;
    end
    if (!rst && !e && e_d) begin
      check(cyc - rise_t == EC, "enable pulse width");
      fall_t = cyc;
    end
  end

  // display model
  int   nibbles = 0;
  bit   half = 0;
  logic [3:0] hi;
  logic       rs_hi;
  logic [8:0] bytes [$];

  always @(negedge e) if (!rst) begin
    check(rw == 1'b0, "write mode");
    if (nibbles < 4) begin
      check(db == ((nibbles == 3) ? 4'h2 : 4'h3) && !rs, "wake-up nibble");
    end else if (!half) begin
      hi = db; rs_hi = rs; half = 1;
    end else begin
      check(rs == rs_hi, "rs stable across a byte");
      bytes.push_back({rs, hi, db});
      half = 0;
      last_gap_min = ({hi, db} == 8'h01 && !rs) ? CLR : CMD;
    end
    nibbles++;
  end

  function automatic logic [7:0] hx(logic [3:0] d);
    return (d < 10) ? 8'h30 + 8'(d) : 8'h41 + 8'(d) - 8'd10;
  endfunction

  task automatic expect_byte(bit r, logic [7:0] b, string what);
    logic [8:0] got;
    while (bytes.size() == 0) @(posedge clk);
    got = bytes.pop_front();
    check(got == {r, b}, $sformatf("%s: got rs=%0d %02h expected rs=%0d %02h", what, got[8], got[7:0], r, b));
  endtask

  initial begin
    logic [31:0] shown;
    repeat (3) @(negedge clk);
    rst = 0;
    expect_byte(0, 8'h28, "function set");
    expect_byte(0, 8'h0C, "display on");
    expect_byte(0, 8'h06, "entry mode");
    expect_byte(0, 8'h01, "clear");
    for (int line = 0; line < 3; line++) begin
      shown = value;
      expect_byte(0, 8'h80, "cursor home");
      for (int d = 7; d >= 0; d--) expect_byte(1, hx(shown[4*d +: 4]), $sformatf("digit %0d", d));
      value = $urandom;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
