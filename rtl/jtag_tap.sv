// jtag_tap: IEEE 1149.1 Test Access Port controller, run from the system clock.
//
// The four TAP pins (plus the optional TRST) are brought into the `clk`
// domain through two-flop synchronizers, and rising and falling edges of TCK
// are detected there; all TAP logic then advances on one-cycle enables.
// This keeps the whole access path in one clock domain and requires TCK to
// be slower than clk/4 (each TCK phase at least two clk cycles long).
//
// On every TCK rising edge the 16-state machine moves according to TMS, and
// the register selected by the state and the instruction register captures
// or shifts (TDI enters at the most significant bit, the LSB leaves on TDO).
// TDO changes on the TCK falling edge, as the standard requires, and is 0
// outside the shift states. The instruction register is 4 bits, captures
// 0001 and resets to IDCODE. IDCODE and BYPASS registers live here; the data
// registers of the private parallel-access instructions live in
// jtag_par_bridge, which receives `dr_capture`, `dr_shift` and `dr_update`
// enables (one clk cycle, aligned with the TCK rising edge that performs the
// action) and returns its serial output on `par_tdo`. Update-IR and
// Update-DR act on the TCK rising edge that leaves the update state, one
// half TCK period later than the standard's falling edge.
//
// The state machine, the IR and the mandatory instructions follow the
// standard; there is no boundary-scan chain in this block, so EXTEST and
// SAMPLE/PRELOAD select the one-bit bypass register.
module jtag_tap
  import jtag_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       tck,
  input  logic       tms,
  input  logic       tdi,
  input  logic       trst_n,
  output logic       tdo,
  // to the parallel-access data registers
  output ir_t        ir,
  output tap_state_t state,
  output logic       tdi_s,
  output logic       dr_capture,
  output logic       dr_shift,
  output logic       dr_update,
  input  logic       par_tdo
);
  logic [1:0] tck_sy, tms_sy, tdi_sy, trst_sy;
  logic       tck_q;
  logic       rise, fall, tms_s, trst_s;
  ir_t        ir_sr;
  logic [31:0] id_sr;
  logic       byp;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tck_sy  <= '0;
      tms_sy  <= '1;
      tdi_sy  <= '0;
      trst_sy <= '0;
      tck_q   <= 1'b0;
    end else begin
      tck_sy  <= {tck_sy[0], tck};
      tms_sy  <= {tms_sy[0], tms};
      tdi_sy  <= {tdi_sy[0], tdi};
      trst_sy <= {trst_sy[0], trst_n};
      tck_q   <= tck_sy[1];
    end
  end

  assign rise   = tck_sy[1] && !tck_q;
  assign fall   = !tck_sy[1] && tck_q;
  assign tms_s  = tms_sy[1];
  assign tdi_s  = tdi_sy[1];
  assign trst_s = !trst_sy[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= TLR;
      ir    <= IR_IDCODE;
      ir_sr <= '0;
      id_sr <= '0;
      byp   <= 1'b0;
      tdo   <= 1'b0;
    end else if (trst_s) begin
      state <= TLR;
      ir    <= IR_IDCODE;
      tdo   <= 1'b0;
    end else begin
      if (rise) begin
        state <= tap_next(state, tms_s);
        unique case (state)
          TLR:        ir    <= IR_IDCODE;
          CAPTURE_IR: ir_sr <= IR_W'(1);
          SHIFT_IR:   ir_sr <= {tdi_s, ir_sr[IR_W-1:1]};
          UPDATE_IR:  ir    <= ir_sr;
          CAPTURE_DR: begin
            id_sr <= IDCODE_VALUE;
            byp   <= 1'b0;
          end
          SHIFT_DR: begin
            id_sr <= {tdi_s, id_sr[31:1]};
            byp   <= tdi_s;
          end
          default: ;
        endcase
      end
      if (fall) begin
        unique case (state)
          SHIFT_IR: tdo <= ir_sr[0];
          SHIFT_DR: begin
            if (ir == IR_IDCODE)      tdo <= id_sr[0];
            else if (is_par_instr(ir)) tdo <= par_tdo;
            else                       tdo <= byp;
          end
          default: tdo <= 1'b0;
        endcase
      end
    end
  end

  assign dr_capture = rise && state == CAPTURE_DR && is_par_instr(ir);
  assign dr_shift   = rise && state == SHIFT_DR   && is_par_instr(ir);
  assign dr_update  = rise && state == UPDATE_DR  && is_par_instr(ir);
endmodule
