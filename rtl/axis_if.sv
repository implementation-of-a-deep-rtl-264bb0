// axis_if: one AXI4-Stream channel (tdata, tvalid, tready, tlast).
//
// The bundle appears three times in the design: DMA to core, core to DMA and
// inside the testbenches. Modport "source" drives the data, "sink" accepts
// it. The assertions encode the AXI4-Stream handshake rule for the source:
// once tvalid is high it stays high, with tdata and tlast unchanged, until a
// cycle in which tready is high. They are checked on aclk while aresetn is
// high.
interface axis_if #(parameter int W = 32) (input logic aclk, input logic aresetn);
  logic [W-1:0] tdata;
  logic         tvalid;
  logic         tready;
  logic         tlast;

  modport source (output tdata, output tvalid, output tlast, input tready);
  modport sink   (input tdata, input tvalid, input tlast, output tready);

  property p_hold;
    @(posedge aclk) disable iff (!aresetn)
      (tvalid && !tready) |=> (tvalid && $stable(tdata) && $stable(tlast));
  endproperty
  a_hold: assert property (p_hold)
    else $error("axis_if: tvalid dropped or payload changed while waiting for tready");
endinterface
