// booth_pkg -- types shared by the radix-4 serial-parallel Booth multiplier.
//
// A radix-4 Booth digit takes one of the values -2, -1, 0, +1, +2. It is
// carried between the recoder, the partial-product selector and the
// controller as three flags: nz (the digit is not zero, so an addition is
// needed), neg (the multiple is subtracted) and two (the multiple is twice
// the multiplicand). The digit values follow the usual radix-4 recoding
// table; packing them into these three flags is a choice of this design.
// The controller's state encoding is also defined here.
package booth_pkg;

  typedef struct packed {
    logic nz;   // digit is +-1 or +-2
    logic neg;  // digit is negative
    logic two;  // magnitude is 2
  } booth_digit_t;

  typedef enum logic [1:0] {
    ST_IDLE = 2'd0,  // waiting for start
    ST_RUN  = 2'd1,  // adding / shifting Booth digits
    ST_DONE = 2'd2   // product valid for one cycle
  } ctrl_state_t;

  // Signed value of a digit, for testbenches and assertions.
  function automatic int digit_value(booth_digit_t d);
    int v;
    v = !d.nz ? 0 : (d.two ? 2 : 1);
    return d.neg ? -v : v;
  endfunction

endpackage
