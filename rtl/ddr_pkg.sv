// ddr_pkg: types and constants shared by the DDR SDRAM controller.
//
// The controller serves a 128-bit bus master from a 64-bit DDR SDRAM with four
// banks, burst length 8 and CAS latency 2, clocked at 133 MHz with a 266 MHz
// data clock. Those figures, the state names of the two state machines and
// the 22-bit system address are taken from the design description. The split
// of the system address into bank/row/column, the timing values in clock
// cycles (JEDEC DDR figures at a 7.5 ns clock) and the command encoding (the
// standard CS#/RAS#/CAS#/WE# truth table) are this design's choices.
`timescale 1ns / 1ps
package ddr_pkg;

  // ---------------------------------------------------------------- geometry
  localparam int unsigned BA_W   = 2;                     // four banks
  localparam int unsigned ROW_W  = 12;                    // ddr_ad[11:0]
  localparam int unsigned COL_W  = 8;                     // columns of 64 bits
  localparam int unsigned ADDR_W = BA_W + ROW_W + COL_W;  // 22-bit sys_addr
  localparam int unsigned DQ_W   = 64;                    // DDR data bus
  localparam int unsigned DATA_W = 2 * DQ_W;              // 128-bit user word

  // ---------------------------------------------------------------- protocol
  localparam int unsigned BURST_LEN = 8;  // beats of DQ_W bits per access
  localparam int unsigned CAS_LAT   = 2;  // read CAS latency in clocks

  // Timing in clocks of clk (7.5 ns at 133 MHz)
  localparam int unsigned T_RP     = 2;     // PRECHARGE to next command (15 ns)
  localparam int unsigned T_RCD    = 2;     // ACTIVE to READ/WRITE (15 ns)
  localparam int unsigned T_RFC    = 10;    // AUTO REFRESH period (75 ns)
  localparam int unsigned T_MRD    = 2;     // LOAD MODE REGISTER to command
  localparam int unsigned T_WR     = 2;     // write recovery (15 ns)
  localparam int unsigned T_REFI   = 2048;  // clocks between AUTO REFRESH (15.4 us)

  // ---------------------------------------------------------------- commands
  // {cs_n, ras_n, cas_n, we_n}
  typedef enum logic [3:0] {
    CMD_LMR   = 4'b0000,
    CMD_AR    = 4'b0001,
    CMD_PRE   = 4'b0010,
    CMD_ACT   = 4'b0011,
    CMD_WRITE = 4'b0100,
    CMD_READ  = 4'b0101,
    CMD_NOP   = 4'b0111,
    CMD_DESEL = 4'b1111
  } ddr_cmd_e;

  // ---------------------------------------------------------------- states
  typedef enum logic [3:0] {
    I_IDLE, I_NOP, I_PRE, I_TRP, I_AR1, I_TRFC1, I_AR2, I_TRFC2,
    I_MRS, I_TMRD, I_READY
  } istate_e;

  typedef enum logic [3:0] {
    C_IDLE, C_ACTIVE, C_TRCD, C_READA, C_CL, C_RDATA,
    C_WRITEA, C_WDATA, C_TDAL, C_AR, C_TRFC
  } cstate_e;

  // System address split: {bank, row, column}
  typedef struct packed {
    logic [BA_W-1:0]  bank;
    logic [ROW_W-1:0] row;
    logic [COL_W-1:0] col;
  } sys_addr_t;

  // Mode register word: burst length in A2:A0, sequential burst (A3 = 0),
  // CAS latency in A6:A4, normal operation in A11:A7.
  function automatic logic [ROW_W-1:0] mode_word(int unsigned bl, int unsigned cl);
    logic [2:0] bl_code;
    logic [2:0] cl_code;
    unique case (bl)
      2:       bl_code = 3'b001;
      4:       bl_code = 3'b010;
      default: bl_code = 3'b011;
    endcase
    cl_code = 3'(cl);
    return ROW_W'({cl_code, 1'b0, bl_code});
  endfunction

endpackage
