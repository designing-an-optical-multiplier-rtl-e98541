// msd_pkg: shared types for the modified signed-digit (MSD) array multiplier.
//
// An MSD number is a radix-2 signed-digit number whose digits are taken from
// {-1, 0, 1}; a value can have several representations, which is what makes
// carry-free addition possible. Every digit is carried in digit-decomposition-
// plane (DDP) form: three plane bits, one per digit value, exactly one of
// which is set. A data array of M x N numbers of W digits is therefore three
// M x N x W bit planes; here it is held as an M x N x W array of ddp_digit_t,
// so that a[i][j][k].p1 is pixel (i,j,k) of plane DDP-1.
//
// The DDP coding and the one-hot rule (the three planes superimpose to an all-
// set plane, and each plane is the complement of the other two) follow the
// design description. The helper functions below (encoding, decoding, one-hot
// check) are convenience code for assertions and testbenches.
package msd_pkg;

  // One MSD digit in DDP form. p1: digit is 1, z0: digit is 0, m1: digit is -1.
  typedef struct packed {
    logic p1;
    logic z0;
    logic m1;
  } ddp_digit_t;

  localparam ddp_digit_t DDP_ZERO = '{p1: 1'b0, z0: 1'b1, m1: 1'b0};
  localparam ddp_digit_t DDP_ONE  = '{p1: 1'b1, z0: 1'b0, m1: 1'b0};
  localparam ddp_digit_t DDP_MONE = '{p1: 1'b0, z0: 1'b0, m1: 1'b1};

  // Integer digit (-1, 0, 1) to DDP form; anything else maps to zero.
  function automatic ddp_digit_t ddp_encode(input int d);
    if (d > 0)      return DDP_ONE;
    else if (d < 0) return DDP_MONE;
    else            return DDP_ZERO;
  endfunction

  // DDP form to integer digit. Assumes a one-hot digit.
  function automatic int ddp_decode(input ddp_digit_t d);
    return d.z0 ? 0 : int'(d.p1) - int'(d.m1);
  endfunction

  // True when exactly one of the three plane bits is set.
  function automatic logic ddp_valid(input ddp_digit_t d);
    return (d.p1 + d.z0 + d.m1) == 2'd1;
  endfunction

endpackage
