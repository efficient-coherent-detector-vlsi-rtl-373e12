// token_bus: survivor re-distribution bus of the SPEC-T decoder.
//
// After the path purge each register array PD_i is empty, carefree or
// congested. Two tokens travel along the chain of arrays, entering at PD_0:
// the broadcasting token BT is kept by the first congested array and passed
// on by all others, the receiving token RT is kept by the first empty array
// and passed on by all others. Each cycle the BT holder drives one of its
// extra survivors onto the bus (an AND-OR bus) and the RT holder stores it.
// The decoder repeats this until no array is congested.
//
// If the chain has a congested array but no empty one (possible only when
// the threshold loop gave up with too many survivors), rt_grant stays low and
// the BT holder's extra path is simply dropped; `drop` flags that cycle.
// Combinational; the token positions follow from the arrays' state each cycle.
module token_bus #(
  parameter int unsigned NPD   = 32,
  parameter int unsigned PKT_W = 8
)(
  input  logic [NPD-1:0]             congested,
  input  logic [NPD-1:0]             empty,
  input  logic [NPD-1:0][PKT_W-1:0]  pkt,
  output logic [NPD-1:0]             bt_grant,
  output logic [NPD-1:0]             rt_grant,
  output logic [PKT_W-1:0]           bus,
  output logic                       active,   // a broadcast or drop happens
  output logic                       drop
);
  logic [NPD:0] bt_pass, rt_pass;   // token arriving at array i

  assign bt_pass[0] = 1'b1;
  assign rt_pass[0] = 1'b1;

  for (genvar i = 0; i < NPD; i++) begin : g_chain
    assign bt_grant[i]  = bt_pass[i] & congested[i];
    assign bt_pass[i+1] = bt_pass[i] & ~congested[i];
    assign rt_grant[i]  = rt_pass[i] & empty[i] & ~bt_pass[NPD];
    assign rt_pass[i+1] = rt_pass[i] & ~empty[i];
  end

  always_comb begin
    bus = '0;
    for (int i = 0; i < NPD; i++)
      bus = bus | (pkt[i] & {PKT_W{bt_grant[i]}});
  end

  assign active = ~bt_pass[NPD];
  assign drop   = active & rt_pass[NPD];
endmodule
