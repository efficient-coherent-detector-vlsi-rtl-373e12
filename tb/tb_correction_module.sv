// tb_correction_module: hands random snapshots to the correction module and
// checks E (the minimum metric difference over valid paths, lowest index on
// ties), the released symbols in both orders, the result latency of NPD + 2
// cycles, `busy`, the hold-until-taken behaviour and the empty-snapshot case.
module tb_correction_module;
  import cpm_pkg::*;
  localparam int NPD = 16, V = 4;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic                  snap, take, busy, res_valid, out_valid;
  logic [NPD-1:0]        snap_valid;
  metric_t [NPD-1:0]     snap_d;
  sym_t [NPD-1:0][V-1:0] snap_sym;
  metric_t               e_val;
  sym_t [V-1:0]          rel_sym, out_sym;
  int checks = 0, failures = 0;

  correction_module #(.NPD(NPD), .V(V)) dut (.*);

  initial begin
    int best, lat, outs;
    snap = 0; take = 0; snap_valid = '0; snap_d = '0; snap_sym = '0;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      for (int i = 0; i < NPD; i++) begin
        snap_valid[i] = (t % 50 == 7) ? 1'b0 : ($urandom_range(3) != 0);
        snap_d[i]     = metric_t'($urandom_range(40));
        snap_sym[i]   = (V*2)'($urandom);
      end
      best = -1;
      for (int i = 0; i < NPD; i++)
        if (snap_valid[i] && (best < 0 || snap_d[i] < snap_d[best])) best = i;
      snap = 1;
      @(negedge clk);
      snap = 0;
      lat = 1; outs = 0;
      while (!res_valid) begin
        checks++;
        if (!busy) failures++;
        outs += int'(out_valid);
        @(negedge clk);
        lat++;
      end
      outs += int'(out_valid);
      checks++;
      if (lat != NPD + 2) begin failures++; $display("latency %0d", lat); end
      checks++;
      if (outs != ((best >= 0) ? 1 : 0)) failures++;
      checks++;
      if (best >= 0) begin
        if (e_val != snap_d[best] || rel_sym != snap_sym[best]) failures++;
        for (int j = 0; j < V; j++) if (out_sym[j] != snap_sym[best][V-1-j]) failures++;
      end else if (e_val != '0) failures++;
      // result is held until taken
      repeat ($urandom_range(3)) @(negedge clk);
      checks++;
      if (!res_valid || busy) failures++;
      take = 1;
      @(negedge clk);
      take = 0;
      checks++;
      if (res_valid) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
