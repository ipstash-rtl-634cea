// tb_ipstash_skew_index: checks the per-bank skewed indices against a
// bit-by-bit model of the rule: for Classes 1/0 and 2 index bits 7..0 are
// XORed with the 8 tag bits rotated right by the bank number, for Class 3
// index bits 3..0 with the 4-bit tag rotated right by the bank number mod 4;
// the other index bits pass through. With skewing off all banks get the index.
module tb_ipstash_skew_index;
  import ipstash_pkg::*;

  localparam int BANKS = 8;

  logic [INDEX_W-1:0] idx;
  logic [7:0]         sb;
  acc_e               acc;
  logic               en;
  logic [INDEX_W-1:0] bidx [BANKS];

  ipstash_skew_index #(.BANKS(BANKS)) dut (
    .idx(idx), .skew_bits(sb), .acc(acc), .skew_en(en), .bank_idx(bidx)
  );

  int checks = 0, failures = 0;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [11:0] model(logic [11:0] i, logic [7:0] t, acc_e a, bit e, int b);
    logic [11:0] r;
    r = i;
    if (!e) return r;
    if (a == ACC_C3) begin
      for (int k = 0; k < 4; k++) r[k] = i[k] ^ t[(k + b) % 4];
    end else begin
      for (int k = 0; k < 8; k++) r[k] = i[k] ^ t[(k + b) % 8];
    end
    return r;
  endfunction

  initial begin
    for (int n = 0; n < 3000; n++) begin
      idx = 12'($urandom());
      acc = acc_e'($urandom_range(2));
      sb  = (acc == ACC_C3) ? {4'd0, 4'($urandom())} : 8'($urandom());
      en  = (n % 10) != 0;
      #1;
      for (int b = 0; b < BANKS; b++) begin
        checks++;
        if (bidx[b] !== model(idx, sb, acc, en, b)) begin
          failures++;
          if (failures < 10)
            $display("FAIL: idx %h tag %h acc %0d en %0d bank %0d: %h", idx, sb, acc, en, b, bidx[b]);
        end
      end
      // Class 3: banks b and b+4 share an index
      if (acc == ACC_C3 && en) begin
        checks++;
        if (bidx[1] != bidx[5]) failures++;
      end
    end
    // bank 0 is the unrotated XOR, bank 1 rotated once: directed values
    idx = 12'hABC; sb = 8'h01; acc = ACC_C1; en = 1'b1; #1;
    checks++; if (bidx[0] != 12'hABD) failures++;
    checks++; if (bidx[1] != 12'hA3C) failures++;   // 0x01 rotr 1 = 0x80
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
