// inline_fit: decides whether a TLB-miss handler can be taken in line.
//
// The handler has a fixed, known length (straight-line code), so the check is
// three comparisons made when the excepting instruction reaches the head of
// the reorder buffer:
//   * free ROB entries      >= HLEN  (the handler must fit, or the machine
//                                     would deadlock behind the exception),
//   * free execution-queue  >= HIQ   (the handler's integer instructions need
//     entries                          reservation-station space),
//   * free physical         >= HREGS + front_need  (the handler's own register
//     registers                        needs plus what the instructions already
//                                      in the rename stages still need).
// fits is the AND of the three; the separate reasons are brought out for
// statistics. Purely combinational.
//
// The three conditions follow the scheme. The default handler length is the
// 21 instructions of the evaluated machine; HIQ (every handler instruction is
// an integer instruction) and HREGS = 8 are this design's assumptions.
module inline_fit #(
  parameter int unsigned HLEN  = 21,
  parameter int unsigned HIQ   = 21,
  parameter int unsigned HREGS = 8,
  parameter int unsigned CW    = 7,   // width of the free-count inputs
  parameter int unsigned RGW   = 8    // width of the register counts
) (
  input  logic [CW-1:0]  rob_free,
  input  logic [CW-1:0]  iq_free,
  input  logic [RGW-1:0] preg_free,
  input  logic [RGW-1:0] front_need,
  output logic           fits,
  output logic           short_rob,
  output logic           short_iq,
  output logic           short_reg
);
  always_comb begin
    short_rob = int'(rob_free) < HLEN;
    short_iq  = int'(iq_free) < HIQ;
    short_reg = int'(preg_free) < HREGS + int'(front_need);
    fits      = !short_rob && !short_iq && !short_reg;
  end
endmodule
