// sdma_arbiter: the prioritizing arbiter of the shared buses.
//
// Three resources are shared: data bank A, data bank B and the peripheral bus.
// Each of the N_REQ requesters (channel 0 read, channel 0 operand, channel 0
// write, then the same three of channel 1) asks for one resource at a time.
// Per resource the grant goes, in one combinational pass, to the first asker in
// the order processor (banks only) > channel 0 > channel 1, so channel 1 is held
// off whenever channel 0 wants the same bus and proceeds as soon as it does not.
// The peripheral bus is granted only while the APB master is idle, so a
// transfer already under way (of either channel) finishes before another
// starts.  chsel reports which channels hold a grant this cycle.  The fixed
// Channel 0 > Channel 1 priority and finishing the present transfer follow the
// controller's description; the processor's priority on the banks follows its
// bus-release rule; the order of the three sides within a channel is this
// design's choice.
module sdma_arbiter
  import sdma_pkg::*;
(
  input  bus_req_t         req [N_REQ],
  input  logic [1:0]       host_busy,   // processor uses bank A / bank B
  input  logic             apb_busy,
  output logic [N_REQ-1:0] gnt,
  output logic [N_CH-1:0]  chsel
);
  always_comb begin
    logic [2:0] taken;
    taken = {1'b0, host_busy};
    taken[RES_APB] = apb_busy;
    gnt = '0;
    for (int i = 0; i < N_REQ; i++) begin
      if (req[i].req && !taken[req[i].res]) begin
        gnt[i] = 1'b1;
        taken[req[i].res] = 1'b1;
      end
    end
    chsel[0] = |gnt[2:0];
    chsel[1] = |gnt[5:3];
  end

  // a grant never goes to a requester that is not asking
  always_comb begin
    for (int i = 0; i < N_REQ; i++)
      assert (!gnt[i] || req[i].req);
  end

endmodule
