// rom_mult: multiplier of two DW-bit unsigned digits by table look-up.
//
// The polynomial-encoding complex multiplier reduces every multiplication to
// products of two short digits, so that each can be a ROM of 2^(2*DW) words.
// The ROM contents, entry {x, y} = x * y, are computed at elaboration by a
// constant function (no data file); the look-up is purely combinational.
// Interface: x, y digits in, p = x * y (2*DW bits) out, no clock.
// The use of a table for the short multipliers follows the method; the
// address order {x, y} is this design's choice.
module rom_mult #(
  parameter int DW = 2
) (
  input  logic [DW-1:0]   x,
  input  logic [DW-1:0]   y,
  output logic [2*DW-1:0] p
);

  localparam int WORDS = 2 ** (2 * DW);

  typedef logic [2*DW-1:0] word_t;
  typedef word_t table_t [WORDS];

  function automatic table_t gen_table();
    table_t t;
    for (int ax = 0; ax < 2 ** DW; ax++)
      for (int ay = 0; ay < 2 ** DW; ay++)
        t[ax * (2 ** DW) + ay] = word_t'(ax * ay);
    return t;
  endfunction

  localparam table_t ROM = gen_table();

  assign p = ROM[{x, y}];

endmodule
