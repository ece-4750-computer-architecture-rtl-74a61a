// tinyrv1_bypass_net: full bypassing for the four register read ports of
// the D stage.
//
// Each read port compares its register specifier with the destination of
// every in-flight instruction, listed in `prod` from youngest to oldest
// (A0, B0, A1, B1, W-A, W-B in the pipeline), and takes the value of the
// first match; with no match it uses the register file's value. x0 is
// never bypassed. A match on a load that has not read the data memory yet
// (is_load set in the producer entry, i.e. a lw in B0) cannot be
// forwarded: the port's `ready` drops and D must stall for a cycle (the
// load-use case). `hit` tells which ports took a bypassed value.
//
// Purely combinational. Stages A0/B0, A1/B1 and W-A/W-B never hold two
// instructions writing the same register (the issue logic splits such
// pairs), so the order within a stage does not matter. Full bypassing is
// the document's; the priority encoding is the usual one.
module tinyrv1_bypass_net
  import tinyrv1_pkg::*;
#(
  parameter int unsigned NPORTS = 4,
  parameter int unsigned NPROD  = 6
) (
  input  reg_idx_t [NPORTS-1:0] raddr,
  input  word_t    [NPORTS-1:0] rf_rdata,
  input  result_t  [NPROD-1:0]  prod,     // [0] youngest
  output word_t    [NPORTS-1:0] value,
  output logic     [NPORTS-1:0] ready,
  output logic     [NPORTS-1:0] hit
);

  always_comb begin
    for (int p = 0; p < NPORTS; p++) begin
      value[p] = rf_rdata[p];
      ready[p] = 1'b1;
      hit[p]   = 1'b0;
      if (raddr[p] != 5'd0) begin
        for (int s = NPROD - 1; s >= 0; s--) begin
          // iterate oldest to youngest so the youngest match wins
          if (prod[s].valid && prod[s].writes_rd && prod[s].rd == raddr[p]) begin
            value[p] = prod[s].value;
            ready[p] = !prod[s].is_load;
            hit[p]   = 1'b1;
          end
        end
      end
    end
  end

endmodule
