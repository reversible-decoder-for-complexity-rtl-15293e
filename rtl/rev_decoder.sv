// Reversible N-to-2^N decoder.
// The decoder grows one input bit at a time. A Feynman gate with its target
// tied to 1 turns the top input bit into the pair (not bit, bit): a 1-to-2
// decoder. Each further bit then splits every existing output line in two
// with one Fredkin gate per line: control = the new bit, B = the line,
// C = 0, so Q = line AND NOT bit and R = line AND bit. A 2x4 decoder is the
// 1x2 stage plus 2 Fredkin gates, a 3x8 adds 4 more, a 4x16 adds 8 more.
// The new bit is passed from one Fredkin gate to the next through the
// control output, so no wire drives more than one gate.
// The recursion (2x4 + 4 Fredkin = 3x8, 3x8 + 8 Fredkin = 4x16) is the
// document's; starting from a single Feynman gate rather than a dedicated
// 2x4 circuit is this design's choice. The Fredkin control outputs left at
// the end of each chain are the circuit's garbage lines.
// Interface: in[N-1:0] (binary), out[2^N-1:0] one-hot with out[i] = (in == i).
// Purely combinational.
module rev_decoder #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0]      in,
  output logic [2**N-1:0]   out
);
  // lines[k] holds the 2^(k+1) outputs after decoding the top k+1 bits;
  // line j of stage k is high when in[N-1 -: k+1] == j.
  logic [2**N-1:0] lines [N];

  // stage 0: Feynman gate with constant 1 gives (not bit, bit)
  logic unused_p0;
  feynman_gate u_first (.a(in[N-1]), .b(1'b1), .p(unused_p0), .q(lines[0][0]));
  assign lines[0][1] = in[N-1];
  if (N > 1) begin : g_pad0
    assign lines[0][2**N-1:2] = '0;
  end

  for (genvar k = 1; k < int'(N); k++) begin : g_stage
    localparam int unsigned M = 2 ** k;      // lines entering this stage
    logic [M:0] ctl;                          // control bit passed gate to gate
    assign ctl[0] = in[N-1-k];
    for (genvar j = 0; j < int'(M); j++) begin : g_split
      fredkin_gate u_fr (
        .a(ctl[j]), .b(lines[k-1][j]), .c(1'b0),
        .p(ctl[j+1]), .q(lines[k][2*j]), .r(lines[k][2*j+1]));
    end
    if (2 * M < 2 ** N) begin : g_pad
      assign lines[k][2**N-1:2*M] = '0;
    end
    logic unused_ctl;
    assign unused_ctl = ctl[M];
  end

  assign out = lines[N-1];
endmodule
