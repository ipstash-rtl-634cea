// tb_ipstash_dev_arb: three arbiters (static priorities 0, 1 and 5) on one
// wired-OR bus. Searches: the device with the longest length wins, a lone
// hit wins, nobody wins with no hit. Updates: a device holding the prefix
// beats devices with only free space, and the lowest priority number wins
// within a group. Random cases are checked against a model.
module tb_ipstash_dev_arb;
  import ipstash_pkg::*;

  localparam int N = 3;
  localparam int IDS[N] = '{0, 1, 5};

  logic              upd;
  logic              hit  [N];
  logic [PLEN_W-1:0] hlen [N];
  logic              hold [N];
  logic              avail[N];
  logic [ARB_W-1:0]  drv  [N];
  logic [ARB_W-1:0]  bus;
  logic              any  [N];
  logic              win  [N];

  for (genvar i = 0; i < N; i++) begin : g
    ipstash_dev_arb #(.DEV_ID(IDS[i])) u (
      .upd_mode(upd), .hit(hit[i]), .hit_len(hlen[i]), .hold(hold[i]), .avail(avail[i]),
      .arb_in(bus), .arb_out(drv[i]), .any(any[i]), .win(win[i])
    );
  end
  assign bus = drv[0] | drv[1] | drv[2];

  int checks = 0, failures = 0;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4000; n++) begin
      int  best, bestdev, hold_dev, free_dev;
      bit  some;
      upd = $urandom_range(1);
      for (int i = 0; i < N; i++) begin
        hit[i]   = $urandom_range(1);
        hlen[i]  = PLEN_W'(8 + $urandom_range(24));
        hold[i]  = ($urandom_range(3) == 0);
        avail[i] = $urandom_range(1);
      end
      if (n < 10) begin
        // directed: lengths 24 / 22 / 16 all hit, device 0 wins searches
        upd = 0;
        hit[0] = 1; hit[1] = 1; hit[2] = 1;
        hlen[0] = 24; hlen[1] = 22; hlen[2] = 16;
      end
      #1;
      // model
      best = 0; bestdev = -1; some = 0; hold_dev = -1; free_dev = -1;
      for (int i = 0; i < N; i++) begin
        if (!upd && hit[i]) begin
          some = 1;
          if (hlen[i] > best) begin best = hlen[i]; bestdev = i; end
        end
        if (upd && hold[i] && hold_dev < 0) hold_dev = i;
        if (upd && !hold[i] && avail[i] && free_dev < 0) free_dev = i;
        if (upd && (hold[i] || avail[i])) some = 1;
      end
      for (int i = 0; i < N; i++) begin
        bit ew;
        if (!upd) ew = hit[i] && hlen[i] == best;
        else      ew = (hold_dev >= 0) ? (i == hold_dev) : (i == free_dev);
        checks++;
        if (win[i] != ew || any[i] != some) begin
          failures++;
          if (failures < 10) $display("FAIL n=%0d dev %0d: win %0d expected %0d", n, i, win[i], ew);
        end
      end
      if (!upd) begin
        checks++;
        if (!upd && some && bus != (ARB_W'(hit[0]) << (hlen[0]-1) | ARB_W'(hit[1]) << (hlen[1]-1) |
                                    ARB_W'(hit[2]) << (hlen[2]-1))) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
