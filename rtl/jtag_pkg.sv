// jtag_pkg: TAP controller states and the instruction codes of the JTAG
// access path.
//
// The 16 states are those of IEEE 1149.1. The instruction register is 4 bits
// wide; besides the standard EXTEST, SAMPLE/PRELOAD, IDCODE and BYPASS codes
// there are three private instructions that reach the parallel register bus:
// PAR_ADDR loads the register address, PAR_WRITE shifts in data and writes it
// at Update-DR, PAR_READ starts a read at Update-DR and returns the result on
// the next capture. Codes and the IDCODE value are this design's choice.
package jtag_pkg;

  parameter int IR_W = 4;

  typedef enum logic [3:0] {
    TLR        = 4'h0,  // Test-Logic-Reset
    RTI        = 4'h1,  // Run-Test/Idle
    SEL_DR     = 4'h2,
    CAPTURE_DR = 4'h3,
    SHIFT_DR   = 4'h4,
    EXIT1_DR   = 4'h5,
    PAUSE_DR   = 4'h6,
    EXIT2_DR   = 4'h7,
    UPDATE_DR  = 4'h8,
    SEL_IR     = 4'h9,
    CAPTURE_IR = 4'hA,
    SHIFT_IR   = 4'hB,
    EXIT1_IR   = 4'hC,
    PAUSE_IR   = 4'hD,
    EXIT2_IR   = 4'hE,
    UPDATE_IR  = 4'hF
  } tap_state_t;

  typedef logic [IR_W-1:0] ir_t;

  parameter ir_t IR_EXTEST    = 4'b0000;
  parameter ir_t IR_IDCODE    = 4'b0001;
  parameter ir_t IR_SAMPLE    = 4'b0010;
  parameter ir_t IR_PAR_ADDR  = 4'b1000;
  parameter ir_t IR_PAR_WRITE = 4'b1001;
  parameter ir_t IR_PAR_READ  = 4'b1010;
  parameter ir_t IR_BYPASS    = 4'b1111;

  parameter logic [31:0] IDCODE_VALUE = 32'h1C0D_E0A5;

  // Data register lengths of the private instructions.
  parameter int PAR_ADDR_LEN  = 16;
  parameter int PAR_WRITE_LEN = 16;
  parameter int PAR_READ_LEN  = 18;   // {error, pending, data[15:0]}

  function automatic logic is_par_instr(ir_t ir);
    return ir == IR_PAR_ADDR || ir == IR_PAR_WRITE || ir == IR_PAR_READ;
  endfunction

  function automatic tap_state_t tap_next(tap_state_t s, logic tms);
    unique case (s)
      TLR:        return tms ? TLR       : RTI;
      RTI:        return tms ? SEL_DR    : RTI;
      SEL_DR:     return tms ? SEL_IR    : CAPTURE_DR;
      CAPTURE_DR: return tms ? EXIT1_DR  : SHIFT_DR;
      SHIFT_DR:   return tms ? EXIT1_DR  : SHIFT_DR;
      EXIT1_DR:   return tms ? UPDATE_DR : PAUSE_DR;
      PAUSE_DR:   return tms ? EXIT2_DR  : PAUSE_DR;
      EXIT2_DR:   return tms ? UPDATE_DR : SHIFT_DR;
      UPDATE_DR:  return tms ? SEL_DR    : RTI;
      SEL_IR:     return tms ? TLR       : CAPTURE_IR;
      CAPTURE_IR: return tms ? EXIT1_IR  : SHIFT_IR;
      SHIFT_IR:   return tms ? EXIT1_IR  : SHIFT_IR;
      EXIT1_IR:   return tms ? UPDATE_IR : PAUSE_IR;
      PAUSE_IR:   return tms ? EXIT2_IR  : PAUSE_IR;
      EXIT2_IR:   return tms ? UPDATE_IR : SHIFT_IR;
      UPDATE_IR:  return tms ? SEL_DR    : RTI;
      default:    return TLR;
    endcase
  endfunction

endpackage
