// ipstash_skew_index: skewed set indices, one per bank of ways.
//
// Skewed associativity gives every bank of ways its own indexing function so
// that prefixes which collide in one bank land in different sets of another.
// For access classes 1/0 and 2 the upper 4 index bits pass through and the
// lower 8 index bits are XORed with the 8 rightmost tag bits rotated right by
// b places for bank b. For Class 3 the upper 8 index bits pass through and the
// lower 4 bits are XORed with the 4-bit tag rotated right by b mod 4 places, so
// banks b and b+4 share an index. This is the document's scheme; that bank 0
// uses a rotation of zero is this design's reading of it. With skew_en low
// every bank gets the plain index (a standard set-associative array).
//
// Purely combinational: idx/skew_bits/acc in, BANKS indices out, same cycle.
module ipstash_skew_index
  import ipstash_pkg::*;
#(
  parameter int unsigned BANKS = 8
) (
  input  logic [INDEX_W-1:0] idx,        // class index of the access
  input  logic [7:0]         skew_bits,  // tag bits that feed the XOR
  input  acc_e               acc,        // access class
  input  logic               skew_en,    // 0: standard set-associative indexing
  output logic [INDEX_W-1:0] bank_idx [BANKS]
);

  function automatic logic [7:0] rotr8(input logic [7:0] v, input int unsigned n);
    return 8'(({v, v} >> (n % 8)));
  endfunction

  function automatic logic [3:0] rotr4(input logic [3:0] v, input int unsigned n);
    return 4'(({v, v} >> (n % 4)));
  endfunction

  always_comb begin
    for (int unsigned b = 0; b < BANKS; b++) begin
      if (!skew_en)
        bank_idx[b] = idx;
      else if (acc == ACC_C3)
        bank_idx[b] = {idx[11:4], idx[3:0] ^ rotr4(skew_bits[3:0], b)};
      else
        bank_idx[b] = {idx[11:8], idx[7:0] ^ rotr8(skew_bits, b)};
    end
  end

endmodule
