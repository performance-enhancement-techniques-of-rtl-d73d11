// pipn_pkg: types and constants shared by every block of the PIPN switches.
//
// A cell travels word-parallel through the fabric, one cell per link per clock (one clock is
// one cell slot). It carries a valid bit, a flag telling whether its destination field is
// currently complemented (set by the distributor for the back-plane group, cleared by the
// decider), the destination address and a payload tag. The address field is sized for the
// largest switch evaluated, 256 ports; a smaller switch uses its low bits. The width of the
// payload tag is this design's choice: it stands in for the body of an ATM cell, which the
// fabric never looks at.
package pipn_pkg;

  localparam int ADDR_W    = 8;   // destination field, enough for 256 ports
  localparam int PAYLOAD_W = 16;  // payload tag carried with every cell

  typedef struct packed {
    logic                 valid;
    logic                 compl_f;  // destination field is complemented
    logic [ADDR_W-1:0]    dest;
    logic [PAYLOAD_W-1:0] payload;
  } cell_t;

  localparam cell_t EMPTY_CELL = '0;

  // log2 of a power of two, also usable in parameter expressions
  function automatic int ilog2(input int v);
    int r;
    r = 0;
    while ((1 << (r + 1)) <= v) r++;
    return r;
  endfunction

endpackage
