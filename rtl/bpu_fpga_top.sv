// FPGA top level of the branch-prediction test processor.
//
// Holds the pipelined 8-bit processor with its branch prediction unit and
// the board I/O of the reference implementation: eight switches form the
// input port read by the IN instruction, two select inputs choose which of
// the registers r1..r4 is shown on the eight LEDs, and the number of clock
// cycles the program has taken is shown on the character LCD. Setting
// USE_BPU to 0 builds the same processor without branch prediction, for
// comparison. The program is written into instruction memory through the
// imem_* port while rst is high (or preloaded in the bitstream).
// Which registers the select inputs reach, and the load port, are this
// design's own choices.
module bpu_fpga_top
  import bpu_pkg::*;
#(
  parameter bit          USE_BPU        = 1'b1,
  parameter int unsigned BTB_ENTRIES    = 8,
  parameter int unsigned IMEM_BYTES     = 512,
  parameter int unsigned DMEM_BYTES     = 256,
  parameter int unsigned POWERUP_CYCLES = 1_500_000,
  parameter int unsigned E_CYCLES       = 25,
  parameter int unsigned CMD_CYCLES     = 4_000,
  parameter int unsigned CLEAR_CYCLES   = 164_000
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic [7:0]                    sw,
  input  logic [1:0]                    sel,
  output logic [7:0]                    led,
  output logic                          lcd_e,
  output logic                          lcd_rs,
  output logic                          lcd_rw,
  output logic [3:0]                    lcd_db,
  input  logic                          imem_we,
  input  logic [$clog2(IMEM_BYTES)-1:0] imem_waddr,
  input  logic [7:0]                    imem_wdata,
  output logic                          halted,
  output logic [31:0]                   cycle,
  output data_t                         regs [NREGS],
  // processor status, for observation
  output addr_t                         pc,
  output logic [7:0]                    state,
  output logic                          ex_start,
  output logic [2:0]                    sp,
  output logic                          btb_valid  [BTB_ENTRIES],
  output addr_t                         btb_branch [BTB_ENTRIES],
  output addr_t                         btb_target [BTB_ENTRIES],
  output pred_state_e                   fsm_state  [BTB_ENTRIES],
  output logic                          branch,
  output logic                          btbhit,
  output logic                          redirect,
  output logic                          wp,
  output logic                          br_done,
  output logic                          br_fast,
  output logic                          btb_alloc,
  output logic                          ex_hold
);

  cpu #(
    .USE_BPU    (USE_BPU),
    .BTB_ENTRIES(BTB_ENTRIES),
    .IMEM_BYTES (IMEM_BYTES),
    .DMEM_BYTES (DMEM_BYTES),
    .RS_DEPTH   (8)
  ) u_cpu (
    .clk       (clk),
    .rst       (rst),
    .in_port   (sw),
    .imem_we   (imem_we),
    .imem_waddr(imem_waddr),
    .imem_wdata(imem_wdata),
    .halted    (halted),
    .cycle     (cycle),
    .pc        (pc),
    .state     (state),
    .ex_start  (ex_start),
    .regs      (regs),
    .stack_ptr (sp),
    .btb_valid (btb_valid),
    .btb_branch(btb_branch),
    .btb_target(btb_target),
    .fsm_state (fsm_state),
    .branch    (branch),
    .btbhit    (btbhit),
    .redirect  (redirect),
    .wp        (wp),
    .br_done   (br_done),
    .br_fast   (br_fast),
    .btb_alloc (btb_alloc),
    .ex_hold   (ex_hold)
  );

  // Register shown on the LEDs: sel = 0..3 selects r1..r4.
  always_ff @(posedge clk) begin
    if (rst) led <= '0;
    else     led <= regs[3'(sel) + 3'd1];
  end

  lcd_ctrl #(
    .POWERUP_CYCLES(POWERUP_CYCLES),
    .E_CYCLES      (E_CYCLES),
    .CMD_CYCLES    (CMD_CYCLES),
    .CLEAR_CYCLES  (CLEAR_CYCLES)
  ) u_lcd (
    .clk   (clk),
    .rst   (rst),
    .value (cycle),
    .lcd_e (lcd_e),
    .lcd_rs(lcd_rs),
    .lcd_rw(lcd_rw),
    .lcd_db(lcd_db)
  );

endmodule
