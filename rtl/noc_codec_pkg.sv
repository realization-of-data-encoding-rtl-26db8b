// Shared types and the link coupling model for the coupling-aware flit codecs.
//
// The codecs look at the link two adjacent lines at a time. For a pair of lines
// (line i, line i+1) the value before the transfer is `prev` and the value being
// sent is `cur`. Four coupling transition types are distinguished:
//   Type I   - exactly one of the two lines switches            (coupling cost 1)
//   Type II  - both switch, in opposite directions (01<->10)     (coupling cost 2)
//   Type III - both switch in the same direction (00<->11)       (coupling cost 0)
//   Type IV  - neither line switches                             (coupling cost 0)
// The costs 1/2/0/0 are the usual effective-switched-capacitance weights for the
// coupling capacitor between two lines; they are this package's choice of weights,
// the type definitions themselves follow the published scheme. Every encoder
// decision in this library is expressed as a gain in this cost.
package noc_codec_pkg;

  // Flit kinds carried beside the data lines. Header flits hold routing control
  // information and are never encoded; body and tail flits are.
  typedef enum logic [1:0] {
    FLIT_HEAD = 2'b00,
    FLIT_BODY = 2'b01,
    FLIT_TAIL = 2'b10
  } flit_type_e;

  // Inversion actions, coded as {odd_invert, even_invert}: full inversion is
  // odd and even inversion together.
  typedef enum logic [1:0] {
    INV_NONE = 2'b00,
    INV_EVEN = 2'b01,
    INV_ODD  = 2'b10,
    INV_FULL = 2'b11
  } inv_action_e;

  // Coupling cost of one pair of adjacent lines, see the table above.
  function automatic logic [1:0] pair_cost(input logic [1:0] prev, input logic [1:0] cur);
    logic [1:0] sw;
    sw = prev ^ cur;
    if (sw[0] ^ sw[1])                 return 2'd1;  // Type I
    else if (&sw && (prev[0] ^ prev[1])) return 2'd2;  // Type II
    else                                return 2'd0;  // Type III or IV
  endfunction

endpackage
