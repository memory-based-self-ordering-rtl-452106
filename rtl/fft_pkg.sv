// fft_pkg: types, widths and address-bit helpers shared by the self-ordering
// memory-based radix-2 FFT.
//
// A sample is a complex number held as two signed fixed-point words of DW bits
// (18 bits, the word length the design was built and measured with). Twiddle
// factors use TW bits with full scale 2^(TW-1)-1 standing for +1.0; that width
// is this design's choice.
//
// The helper functions work on 32-bit vectors so that every module can use
// them whatever its transform length; callers truncate to their own width.
//   swap_bits   exchanges two bit positions (the "Swap" boxes of the address
//               generator).
//   insert_bit  opens a gap at a bit position and fills it with a value (the
//               "insert 0 / insert 1" boxes).
//   bank_of     the two memory-block select bits of an address: bits SH and
//               SH-1, where SH = int(S/2) is the centre bit of an S-bit address.
//   local_of    the address inside a block: all other bits, in order.
package fft_pkg;

  localparam int DW = 18;  // real / imaginary word length of a sample
  localparam int TW = 18;  // real / imaginary word length of a twiddle factor

  typedef struct packed {
    logic signed [DW-1:0] re;
    logic signed [DW-1:0] im;
  } cplx_t;

  typedef struct packed {
    logic signed [TW-1:0] re;
    logic signed [TW-1:0] im;
  } tw_t;

  typedef logic [31:0] word_t;

  function automatic word_t swap_bits(word_t x, int i, int j);
    word_t y;
    y    = x;
    y[i] = x[j];
    y[j] = x[i];
    return y;
  endfunction

  function automatic word_t insert_bit(word_t x, int pos, logic v);
    word_t lo_mask;
    lo_mask = (word_t'(1) << pos) - 1;
    return ((x & ~lo_mask) << 1) | (word_t'(v) << pos) | (x & lo_mask);
  endfunction

  function automatic logic [1:0] bank_of(word_t a, int sh);
    return {a[sh], a[sh-1]};
  endfunction

  function automatic word_t local_of(word_t a, int sh);
    word_t lo_mask;
    lo_mask = (word_t'(1) << (sh - 1)) - 1;
    return ((a >> (sh + 1)) << (sh - 1)) | (a & lo_mask);
  endfunction

endpackage
