// jtag_tap: JTAG (IEEE 1149.1 style) test access port controller of the DPC.
//
// It gives serial access to the debug shift registers (DSRs) of both CPU
// cores. The TAP pins are sampled with the system clock through two-stage
// synchronisers, so TCK must be slower than clk/4; everything then runs in
// the clk domain. On each detected TCK rising edge the 16-state TAP
// controller advances on TMS, captures (Capture-xR) or shifts TDI in
// (Shift-xR). Updates happen at the TCK falling edge in Update-xR, and TDO
// changes at TCK falling edges, as the standard asks. TRST_N or five TCK
// cycles with TMS high return it to Test-Logic-Reset.
//
// Instruction register: 4 bits, captures 4'b0001. IR_DSR1/IR_DSR2 select
// the DSR of CPU 1/2; every other code selects the one-bit bypass register,
// which is also the instruction after reset. For the selected DSR the TAP
// gives dsr_sel plus one-clock strobes dr_capture, dr_shift, dr_update and
// the sampled TDI; the DSR returns its bit 0 on dsr_tdo.
//
// A TAP compatible controller reaching the two DSRs follows the published
// design; the oversampling, instruction codes and register length are choices
// of this implementation.
module jtag_tap (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       tck,
  input  logic       tms,
  input  logic       tdi,
  input  logic       trst_n,
  output logic       tdo,
  // towards the DSRs
  output logic [1:0] dsr_sel,
  output logic       dr_capture,
  output logic       dr_shift,
  output logic       dr_update,
  output logic       dr_tdi,
  input  logic [1:0] dsr_tdo
);
  import dpc_pkg::*;

  typedef enum logic [3:0] {
    TLR, RTI,
    SEL_DR, CAP_DR, SH_DR, EX1_DR, PA_DR, EX2_DR, UPD_DR,
    SEL_IR, CAP_IR, SH_IR, EX1_IR, PA_IR, EX2_IR, UPD_IR
  } tap_state_e;

  logic [2:0] tck_s;
  logic [1:0] tms_s, tdi_s, trst_s;
  logic       rise, fall;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tck_s  <= '0;
      tms_s  <= '1;
      tdi_s  <= '0;
      trst_s <= '0;
    end else begin
      tck_s  <= {tck_s[1:0], tck};
      tms_s  <= {tms_s[0], tms};
      tdi_s  <= {tdi_s[0], tdi};
      trst_s <= {trst_s[0], trst_n};
    end
  end
  assign rise = tck_s[1] && !tck_s[2];
  assign fall = !tck_s[1] && tck_s[2];

  function automatic tap_state_e next_state(tap_state_e s, logic m);
    unique case (s)
      TLR:    return m ? TLR    : RTI;
      RTI:    return m ? SEL_DR : RTI;
      SEL_DR: return m ? SEL_IR : CAP_DR;
      CAP_DR: return m ? EX1_DR : SH_DR;
      SH_DR:  return m ? EX1_DR : SH_DR;
      EX1_DR: return m ? UPD_DR : PA_DR;
      PA_DR:  return m ? EX2_DR : PA_DR;
      EX2_DR: return m ? UPD_DR : SH_DR;
      UPD_DR: return m ? SEL_DR : RTI;
      SEL_IR: return m ? TLR    : CAP_IR;
      CAP_IR: return m ? EX1_IR : SH_IR;
      SH_IR:  return m ? EX1_IR : SH_IR;
      EX1_IR: return m ? UPD_IR : PA_IR;
      PA_IR:  return m ? EX2_IR : PA_IR;
      EX2_IR: return m ? UPD_IR : SH_IR;
      UPD_IR: return m ? SEL_DR : RTI;
      default: return TLR;
    endcase
  endfunction

  tap_state_e      state;
  logic [IR_W-1:0] ir, ir_sr;
  logic            bypass;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= TLR;
      ir     <= IR_BYPASS;
      ir_sr  <= '0;
      bypass <= 1'b0;
      tdo    <= 1'b0;
    end else if (!trst_s[1]) begin
      state  <= TLR;
      ir     <= IR_BYPASS;
      tdo    <= 1'b0;
    end else begin
      if (rise) begin
        state <= next_state(state, tms_s[1]);
        unique case (state)
          CAP_IR: ir_sr  <= IR_W'(1);
          SH_IR:  ir_sr  <= {tdi_s[1], ir_sr[IR_W-1:1]};
          CAP_DR: bypass <= 1'b0;
          SH_DR:  bypass <= tdi_s[1];
          default: ;
        endcase
      end
      if (fall) begin
        unique case (state)
          TLR:     ir  <= IR_BYPASS;
          UPD_IR:  ir  <= ir_sr;
          default: ;
        endcase
        unique case (state)
          SH_IR:   tdo <= ir_sr[0];
          SH_DR:   tdo <= dsr_sel[0] ? dsr_tdo[0] : dsr_sel[1] ? dsr_tdo[1] : bypass;
          default: tdo <= 1'b0;
        endcase
      end
    end
  end

  assign dsr_sel[0] = (ir == IR_DSR1);
  assign dsr_sel[1] = (ir == IR_DSR2);
  assign dr_capture = rise && state == CAP_DR && trst_s[1];
  assign dr_shift   = rise && state == SH_DR  && trst_s[1];
  assign dr_update  = fall && state == UPD_DR && trst_s[1];
  assign dr_tdi     = tdi_s[1];

endmodule
