// state_update: probability-state transition of one CABAC context.
//
// Given the {state, MPS} pair a symbol was coded with and the symbol value
// (bin), it produces the pair stored back for the next symbol of the same
// context. This is the "Update" box of the state stage. The transition
// rules are those of the H.264/AVC standard: on an MPS the state index
// moves up by one and saturates at 62; on an LPS it follows the standard's
// transIdxLPS table, and an LPS in state 0 inverts the MPS. State 63 is
// reserved for the termination context and is left unchanged.
//
// Purely combinational; one instance per symbol lane of the update stage.
module state_update
  import mae_pkg::*;
(
  input  pstate_t ps_in,   // pair the symbol was coded with
  input  logic    bin,     // symbol value
  output pstate_t ps_out   // updated pair
);

  // transIdxLPS of H.264/AVC, indexed by the current state.
  function automatic logic [5:0] trans_idx_lps(input logic [5:0] s);
    case (s)
      6'd0:  return 6'd0;   6'd1:  return 6'd0;   6'd2:  return 6'd1;   6'd3:  return 6'd2;
      6'd4:  return 6'd2;   6'd5:  return 6'd4;   6'd6:  return 6'd4;   6'd7:  return 6'd5;
      6'd8:  return 6'd6;   6'd9:  return 6'd7;   6'd10: return 6'd8;   6'd11: return 6'd9;
      6'd12: return 6'd9;   6'd13: return 6'd11;  6'd14: return 6'd11;  6'd15: return 6'd12;
      6'd16: return 6'd13;  6'd17: return 6'd13;  6'd18: return 6'd15;  6'd19: return 6'd15;
      6'd20: return 6'd16;  6'd21: return 6'd16;  6'd22: return 6'd18;  6'd23: return 6'd18;
      6'd24: return 6'd19;  6'd25: return 6'd19;  6'd26: return 6'd21;  6'd27: return 6'd21;
      6'd28: return 6'd22;  6'd29: return 6'd22;  6'd30: return 6'd23;  6'd31: return 6'd24;
      6'd32: return 6'd24;  6'd33: return 6'd25;  6'd34: return 6'd26;  6'd35: return 6'd26;
      6'd36: return 6'd27;  6'd37: return 6'd27;  6'd38: return 6'd28;  6'd39: return 6'd29;
      6'd40: return 6'd29;  6'd41: return 6'd30;  6'd42: return 6'd30;  6'd43: return 6'd30;
      6'd44: return 6'd31;  6'd45: return 6'd32;  6'd46: return 6'd32;  6'd47: return 6'd33;
      6'd48: return 6'd33;  6'd49: return 6'd33;  6'd50: return 6'd34;  6'd51: return 6'd34;
      6'd52: return 6'd35;  6'd53: return 6'd35;  6'd54: return 6'd35;  6'd55: return 6'd36;
      6'd56: return 6'd36;  6'd57: return 6'd36;  6'd58: return 6'd37;  6'd59: return 6'd37;
      6'd60: return 6'd37;  6'd61: return 6'd38;  6'd62: return 6'd38;  default: return 6'd63;
    endcase
  endfunction

  always_comb begin
    ps_out = ps_in;
    if (ps_in.state != 6'd63) begin
      if (bin == ps_in.mps) begin
        if (ps_in.state < 6'd62) ps_out.state = ps_in.state + 6'd1;
      end else begin
        ps_out.state = trans_idx_lps(ps_in.state);
        if (ps_in.state == 6'd0) ps_out.mps = ~ps_in.mps;
      end
    end
  end

endmodule
