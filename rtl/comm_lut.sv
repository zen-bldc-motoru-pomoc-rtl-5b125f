// comm_lut - six-step commutation table.
//
// The three filtered Hall levels form a number code = A + 2*B + 4*C. For
// Direction = 0 the codes 3,2,6,4,5,1 select modes I..VI in turn, so each
// Hall edge advances the conduction sequence by one mode; code 1 selects
// mode VI (phase C upper, phase A lower), the entry printed for the original
// table. Direction = 1 selects the opposite mode (upper and lower swapped),
// which drives the motor the other way. Codes 0 and 7 cannot occur with
// healthy 120-degree sensors and give mode 0, all transistors off. The
// remaining five entries and the invalid-code rule are choices of this design.
// Purely combinational.
module comm_lut
  import bldc_pkg::*;
(
  input  logic [2:0] hall,       // bit0 = A, bit1 = B, bit2 = C
  input  logic       direction,
  output mode_t      mode,       // 0 = off, 1..6 = modes I..VI
  output gates_t     gates
);

  mode_t fwd;

  always_comb begin
    unique case (hall)
      3'd3:    fwd = 3'd1;
      3'd2:    fwd = 3'd2;
      3'd6:    fwd = 3'd3;
      3'd4:    fwd = 3'd4;
      3'd5:    fwd = 3'd5;
      3'd1:    fwd = 3'd6;
      default: fwd = 3'd0;
    endcase
    if (fwd == 3'd0 || !direction) mode = fwd;
    else                           mode = (fwd > 3'd3) ? fwd - 3'd3 : fwd + 3'd3;
    gates = mode_gates(mode);
  end

endmodule
