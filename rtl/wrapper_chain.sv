// wrapper_chain: wrapper scan chain of a core test shell.
//
// One wrapper cell per core input (NI) and per core output (NO), joined
// into a single scan chain: si -> input cells -> output cells -> so. In
// functional mode the cells are transparent. With intest set, the input
// cells drive the core's inputs, so the core can be tested from its own
// scan chains in isolation; with extest set, the output cells drive the
// core's outputs towards the rest of the chip, so the interconnect can be
// tested. On every test clock edge a cell either shifts (se high) or
// captures (se low): input cells capture what arrives from outside the
// core, output cells what the core produces. Isolation of all core inputs
// and outputs by a wrapper chain follows the chip description; the cell
// design is this design's choice (a plain mux-D scan cell, no update stage).
//
// Timing: rising edge of tclk, the core's test clock. No reset (test data).
module wrapper_chain #(
  parameter int unsigned NI = 2,
  parameter int unsigned NO = 1
) (
  input  logic          tclk,
  input  logic          se,
  input  logic          si,
  output logic          so,
  input  logic          intest,
  input  logic          extest,
  input  logic [NI-1:0] pin_in,    // from outside the core
  output logic [NI-1:0] core_in,   // into the core
  input  logic [NO-1:0] core_out,  // from the core
  output logic [NO-1:0] pin_out    // to outside the core
);
  localparam int unsigned N = NI + NO;
  logic [N-1:0] wcell;   // [NI-1:0] input cells, [N-1:NI] output cells

  always_ff @(posedge tclk)
    if (se) wcell <= {wcell[N-2:0], si};
    else    wcell <= {core_out, pin_in};

  assign so      = wcell[N-1];
  assign core_in = intest ? wcell[NI-1:0] : pin_in;
  assign pin_out = extest ? wcell[N-1:NI] : core_out;
endmodule
