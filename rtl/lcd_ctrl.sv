// Character-LCD driver that shows a 32-bit value (the clock-cycle count) as
// eight hexadecimal digits at the start of the first line.
//
// Targets the common HD44780-type controller in its 4-bit bus mode (the
// 16x2 display found on Virtex-5 evaluation boards): lcd_db carries one
// nibble, lcd_rs selects command (0) or character (1), lcd_rw is tied to
// write and lcd_e strobes each nibble. After POWERUP_CYCLES the driver sends
// the 4-bit wake-up sequence (nibbles 3, 3, 3, 2), then function set 0x28,
// display on 0x0C, entry mode 0x06 and clear 0x01. It then loops forever:
// cursor to address 0 (0x80, which also samples value) and the eight digits,
// most significant first. A byte is sent high nibble first; lcd_db and
// lcd_rs are set up one cycle before lcd_e rises, lcd_e stays high for
// E_CYCLES, and the driver waits CMD_CYCLES after each nibble (CLEAR_CYCLES
// after the clear command). Defaults assume a 100 MHz clock.
// Showing the count on the LCD follows the reference design; the display
// format, controller type and timing are this design's own choices.
module lcd_ctrl #(
  parameter int unsigned POWERUP_CYCLES = 1_500_000,  // 15 ms
  parameter int unsigned E_CYCLES       = 25,         // 250 ns
  parameter int unsigned CMD_CYCLES     = 4_000,      // 40 us
  parameter int unsigned CLEAR_CYCLES   = 164_000     // 1.64 ms
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [31:0] value,
  output logic        lcd_e,
  output logic        lcd_rs,
  output logic        lcd_rw,
  output logic [3:0]  lcd_db
);

  typedef enum logic [1:0] {S_PWR, S_SETUP, S_EHIGH, S_WAIT} st_e;

  localparam int unsigned TW = $clog2(POWERUP_CYCLES + CLEAR_CYCLES + CMD_CYCLES + E_CYCLES + 2);
  localparam logic [4:0] STEP_ADDR = 5'd8;
  localparam logic [4:0] STEP_LAST = 5'd16;

  st_e         st;
  logic [TW-1:0] timer;
  logic [4:0]  step;     // 0-3 wake-up nibbles, 4-7 set-up commands, 8 cursor, 9-16 digits
  logic        low;      // sending the low nibble of a byte
  logic [31:0] shown;

  // Current item of the sequence.
  logic       it_rs, it_nibble;
  logic [7:0] it_byte;
  logic [3:0] digit;

  function automatic logic [7:0] hex_char(logic [3:0] d);
    return (d < 4'd10) ? (8'h30 + 8'(d)) : (8'h37 + 8'(d));
  endfunction

  always_comb begin
    it_rs     = 1'b0;
    it_nibble = 1'b0;
    it_byte   = 8'h00;
    digit     = shown[31 - 4*(step - 9) -: 4];
    unique case (step)
      5'd0, 5'd1, 5'd2: begin it_nibble = 1'b1; it_byte = 8'h30; end
      5'd3:             begin it_nibble = 1'b1; it_byte = 8'h20; end
      5'd4:             it_byte = 8'h28;
      5'd5:             it_byte = 8'h0C;
      5'd6:             it_byte = 8'h06;
      5'd7:             it_byte = 8'h01;
      5'd8:             it_byte = 8'h80;
      default: begin
        it_rs   = 1'b1;
        it_byte = hex_char(digit);
      end
    endcase
  end

  assign lcd_rw = 1'b0;

  always_ff @(posedge clk) begin
    if (rst) begin
      st     <= S_PWR;
      timer  <= '0;
      step   <= '0;
      low    <= 1'b0;
      shown  <= '0;
      lcd_e  <= 1'b0;
      lcd_rs <= 1'b0;
      lcd_db <= '0;
    end else begin
      unique case (st)
        S_PWR: begin
          timer <= timer + 1'b1;
          if (timer == TW'(POWERUP_CYCLES - 1)) begin
            timer <= '0;
            st    <= S_SETUP;
          end
        end
        S_SETUP: begin
          if (step == STEP_ADDR && !low) shown <= value;
          lcd_rs <= it_rs;
          lcd_db <= low ? it_byte[3:0] : it_byte[7:4];
          st     <= S_EHIGH;
          timer  <= '0;
        end
        S_EHIGH: begin
          lcd_e <= 1'b1;
          timer <= timer + 1'b1;
          if (timer == TW'(E_CYCLES)) begin
            lcd_e <= 1'b0;
            timer <= '0;
            st    <= S_WAIT;
          end
        end
        S_WAIT: begin
          timer <= timer + 1'b1;
          if (!it_nibble && !low) begin
            if (timer == TW'(CMD_CYCLES - 1)) begin
              low <= 1'b1;
              st  <= S_SETUP;
            end
          end else if (timer == ((step == 5'd7) ? TW'(CLEAR_CYCLES - 1) : TW'(CMD_CYCLES - 1))) begin
            low  <= 1'b0;
            step <= (step == STEP_LAST) ? STEP_ADDR : step + 1'b1;
            st   <= S_SETUP;
          end
        end
        default: st <= S_PWR;
      endcase
    end
  end

endmodule
