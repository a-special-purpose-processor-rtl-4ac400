// dco_model: behavioural model of the digitally controlled oscillator.
//
// The real part is an analog ring oscillator whose speed is set by a
// control word; this model only reproduces its frequency table so that the
// rest of the chip can be simulated. It is not synthesizable. The low six
// bits of the control word select one of 40 frequencies: the index
// idx = (cw[5:0] - 0x38) mod 64 runs 0..39, and
//   f(idx) = base[idx mod 8] / 2**(idx div 8) MHz,
//   base = 325, 300, 280, 260, 240, 220, 200, 180 MHz,
// so 0x38 gives 325 MHz and 0x1F gives 180/16 = 11.25 MHz. Codes outside
// the table run at the slowest frequency. HFCLK toggles every half period
// (in picoseconds) and follows a new control word from its next edge.
// Inputs: cw (control word, upper bits unused in the model); output HFCLK.
// The table follows the published measured frequencies of the oscillator;
// the formula that reproduces it is this model's.
module dco_model (
  input  logic [15:0] cw,
  output logic        HFCLK
);

  // half period in picoseconds: 500000 / f[MHz], with f = base / 2**oct
  function automatic longint unsigned half_period_ps(logic [5:0] code);
    logic [5:0]      idx;
    longint unsigned base_khz;
    idx = code - 6'h38;
    if (idx > 6'd39) idx = 6'd39;
    unique case (idx[2:0])
      3'd0: base_khz = 325_000;
      3'd1: base_khz = 300_000;
      3'd2: base_khz = 280_000;
      3'd3: base_khz = 260_000;
      3'd4: base_khz = 240_000;
      3'd5: base_khz = 220_000;
      3'd6: base_khz = 200_000;
      default: base_khz = 180_000;
    endcase
    return (longint'(500_000_000) << idx[5:3]) / base_khz;
  endfunction

  initial HFCLK = 1'b0;

  always begin
    #(half_period_ps(cw[5:0]) * 1ps) HFCLK = ~HFCLK;
  end

endmodule
