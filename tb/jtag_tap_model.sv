// jtag_tap_model: behavioural model of a JTAG device for testbenches.
// Follows the IEEE 1149.1 TAP state diagram on the rising edge of TCK, with
// an 8-bit instruction register and a 32-bit data register loaded with
// IDCODE in Capture-DR. Every bit shifted in Shift-DR is also appended to
// dr_bits so a test can compare a whole bitstream.
module jtag_tap_model #(
  parameter logic [31:0] IDCODE = 32'h1234_5093
) (
  input  logic tck,
  input  logic tms,
  input  logic tdi,
  output logic tdo
);
  typedef enum logic [3:0] {
    TLR, RTI, SELDR, CAPDR, SHDR, EX1DR, PAUSEDR, EX2DR, UPDR,
    SELIR, CAPIR, SHIR, EX1IR, PAUSEIR, EX2IR, UPIR
  } tap_t;

  tap_t        state = TLR;
  logic [7:0]  ir_sh = '0, ir = '0;
  logic [31:0] dr_sh = '0;
  bit          dr_bits [$];
  int          n_ir_upd = 0, n_dr_upd = 0, n_rti_clk = 0, n_tlr = 0;
  int          last_dr_len = 0;

  function automatic tap_t nxt(input tap_t s, input logic m);
    case (s)
      TLR:     return m ? TLR   : RTI;
      RTI:     return m ? SELDR : RTI;
      SELDR:   return m ? SELIR : CAPDR;
      CAPDR:   return m ? EX1DR : SHDR;
      SHDR:    return m ? EX1DR : SHDR;
      EX1DR:   return m ? UPDR  : PAUSEDR;
      PAUSEDR: return m ? EX2DR : PAUSEDR;
      EX2DR:   return m ? UPDR  : SHDR;
      UPDR:    return m ? SELDR : RTI;
      SELIR:   return m ? TLR   : CAPIR;
      CAPIR:   return m ? EX1IR : SHIR;
      SHIR:    return m ? EX1IR : SHIR;
      EX1IR:   return m ? UPIR  : PAUSEIR;
      PAUSEIR: return m ? EX2IR : PAUSEIR;
      EX2IR:   return m ? UPIR  : SHIR;
      default: return m ? SELDR : RTI;   // UPIR
    endcase
  endfunction

  assign tdo = (state == SHIR) ? ir_sh[0] : dr_sh[0];

  always @(posedge tck) begin
    case (state)
      TLR:   n_tlr++;
      RTI:   n_rti_clk++;
      CAPIR: ir_sh <= 8'h01;
      CAPDR: begin dr_sh <= IDCODE; dr_bits.delete(); end
      SHIR:  ir_sh <= {tdi, ir_sh[7:1]};
      SHDR:  begin dr_sh <= {tdi, dr_sh[31:1]}; dr_bits.push_back(tdi); end
      UPIR:  begin ir <= ir_sh; n_ir_upd++; end
      UPDR:  begin n_dr_upd++; last_dr_len = dr_bits.size(); end
      default: ;
    endcase
    state <= nxt(state, tms);
  end
endmodule
