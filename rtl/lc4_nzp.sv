// lc4_nzp: condition code of a 16-bit two's-complement value.
//
// Purely combinational. Returns {n,z,p}: 3'b100 for a negative value,
// 3'b010 for zero and 3'b001 for a positive value, the code the NZP register
// stores and the branch logic tests. It sits on the register write-back
// value, as in the datapath diagram.
module lc4_nzp (
  input  logic [15:0] value,
  output logic [2:0]  nzp
);

  always_comb begin
    if (value[15])           nzp = 3'b100;
    else if (value == 16'd0) nzp = 3'b010;
    else                     nzp = 3'b001;
  end

endmodule
