// ncl_pkg: types and helpers shared by the NCL (Null Convention Logic) adders.
//
// A binary digit travels on two rails (dual-rail): rail 0 high means DATA 0,
// rail 1 high means DATA 1, both low is NULL, both high never occurs. A
// quaternary digit travels on four one-hot rails (bit k high means value k).
// Every operation is a DATA wavefront followed by a NULL wavefront.
//
// fa_kind_e selects which full-adder component a structure is built from.
package ncl_pkg;

  typedef logic [1:0] dr_t;   // dual-rail digit: [0] = rail 0, [1] = rail 1
  typedef logic [3:0] qr_t;   // quaternary digit: one-hot 4-rail

  localparam dr_t DR_NULL = 2'b00;
  localparam dr_t DR_0    = 2'b01;
  localparam dr_t DR_1    = 2'b10;
  localparam qr_t QR_NULL = 4'b0000;

  typedef enum logic [3:0] {
    FA_A, FA_B, FA_C, FA_D, FA_A1, FA_A2, FA_C1, FA_D1, FA_D2
  } fa_kind_e;

  // Dual-rail DATA encoding of one bit.
  function automatic dr_t dr_data(input logic v);
    return v ? DR_1 : DR_0;
  endfunction

  // Quaternary DATA encoding of a 2-bit value.
  function automatic qr_t qr_data(input logic [1:0] v);
    return qr_t'(4'b0001 << v);
  endfunction

endpackage
