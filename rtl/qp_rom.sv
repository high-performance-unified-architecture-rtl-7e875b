// qp_rom: quantization parameter ROM.
//
// Returns floor(QP/6) and QP%6 for a 6-bit QP, the two indexes every other
// constant of the quantizer is fetched with. It is a 64-entry combinational
// table filled at elaboration; QP 52..63 are outside H.264 but still decode
// arithmetically. The document names this ROM but not its contents layout;
// the table form is this design's choice.
module qp_rom (
  input  logic [5:0] qp,
  output logic [3:0] qp_div6,
  output logic [2:0] qp_mod6
);

  typedef logic [6:0] entry_t;   // {div6[3:0], mod6[2:0]}

  function automatic entry_t entry(int q);
    entry_t e;
    e[6:3] = 4'(q / 6);
    e[2:0] = 3'(q % 6);
    return e;
  endfunction

  logic [6:0] rom [64];
  always_comb begin
    for (int q = 0; q < 64; q++) rom[q] = entry(q);
  end

  assign qp_div6 = rom[qp][6:3];
  assign qp_mod6 = rom[qp][2:0];

endmodule
