// muller_c: NIN-input Muller C-element with per-input inversion and reset.
//
// The output goes to 1 when every (possibly inverted) input is 1, to 0 when
// every input is 0, and holds its value otherwise. This is the state-holding
// gate the 4-phase handshake between cores is built from: one C-element turns
// the sender's Data Ready into Req, another joins the acknowledges of all
// neighbours. The C-element itself follows the document; the inversion mask
// (standing for the input bubbles of the handshake schematic) and the reset
// are this design's choices.
//
// Interface: a[NIN] inputs, INV mask (bit set = input inverted), rst_n forces
// the output low, y output. No clock: the output settles combinationally.
//
// Circuit note: the element is written as a level-sensitive latch (enable =
// "all inputs agree", data = the agreed value). The latch a tool reports here
// is the intended storage of the C-element, not a coding error.
module muller_c #(
  parameter int unsigned    NIN = 2,
  parameter logic [NIN-1:0] INV = '0
) (
  input  logic           rst_n,
  input  logic [NIN-1:0] a,
  output logic           y
);

  logic [NIN-1:0] ai;
  assign ai = a ^ INV;

  always_latch begin
    if (!rst_n)          y = 1'b0;
    else if (&ai)        y = 1'b1;
    else if (!(|ai))     y = 1'b0;
  end

endmodule
