// tb_token_bus: random congested/empty patterns on a 32-array bus. The
// broadcasting token must land on the lowest-numbered congested array, the
// receiving token on the lowest-numbered empty array (only while someone
// broadcasts), the bus must carry the broadcaster's word, and `drop` must
// flag a broadcaster without a receiver.
module tb_token_bus;
  localparam int NPD = 32, PKT_W = 20;
  logic [NPD-1:0]            congested, empty, bt_grant, rt_grant;
  logic [NPD-1:0][PKT_W-1:0] pkt;
  logic [PKT_W-1:0]          bus;
  logic                      active, drop;
  int checks = 0, failures = 0;

  token_bus #(.NPD(NPD), .PKT_W(PKT_W)) dut (.*);

  initial begin
    int fb, fr;
    for (int t = 0; t < 5000; t++) begin
      for (int i = 0; i < NPD; i++) begin
        int r;
        r = $urandom_range(9);
        // a carefree array is neither; sparse patterns exercise long bypasses
        congested[i] = (r == 0) && ($urandom_range(3) == 0 || t % 7 == 0);
        empty[i]     = (r == 1) && (t % 5 != 0);
        pkt[i]       = PKT_W'($urandom);
      end
      #1;
      fb = -1; fr = -1;
      for (int i = NPD - 1; i >= 0; i--) begin
        if (congested[i]) fb = i;
        if (empty[i]) fr = i;
      end
      checks++;
      if (bt_grant != ((fb >= 0) ? NPD'(1) << fb : '0)) failures++;
      checks++;
      if (rt_grant != ((fb >= 0 && fr >= 0) ? NPD'(1) << fr : '0)) failures++;
      checks++;
      if (active != (fb >= 0)) failures++;
      checks++;
      if (drop != (fb >= 0 && fr < 0)) failures++;
      if (fb >= 0) begin
        checks++;
        if (bus != pkt[fb]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
