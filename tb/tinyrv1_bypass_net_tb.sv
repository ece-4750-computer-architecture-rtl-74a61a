// tinyrv1_bypass_net_tb: random in-flight results (register specifiers
// drawn from a few registers so that matches are frequent) against a
// reference that scans producers from youngest to oldest and stops at the
// first match. Checks value, ready (load in B0 not yet available) and hit.
module tinyrv1_bypass_net_tb;
  import tinyrv1_pkg::*;

  reg_idx_t [3:0] raddr;
  word_t    [3:0] rf_rdata, value;
  logic     [3:0] ready, hit;
  result_t  [5:0] prod;
  int checks = 0, failures = 0;

  tinyrv1_bypass_net #(.NPORTS(4), .NPROD(6)) dut (.*);

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t ev; logic er, eh;
    for (int t = 0; t < 5000; t++) begin
      for (int s = 0; s < 6; s++) begin
        prod[s].valid     = 1'($urandom_range(0, 1));
        prod[s].writes_rd = ($urandom_range(0, 4) != 0);
        prod[s].is_load   = (s == 1) && ($urandom_range(0, 2) == 0);
        prod[s].rd        = 5'($urandom_range(0, 4));
        prod[s].value     = $urandom;
      end
      for (int p = 0; p < 4; p++) begin
        raddr[p] = 5'($urandom_range(0, 4));
        rf_rdata[p] = (raddr[p] == 0) ? '0 : $urandom;
      end
      #1;
      for (int p = 0; p < 4; p++) begin
        ev = rf_rdata[p]; er = 1'b1; eh = 1'b0;
        if (raddr[p] != 0)
          for (int s = 0; s < 6; s++)
            if (prod[s].valid && prod[s].writes_rd && prod[s].rd == raddr[p]) begin
              ev = prod[s].value; er = !prod[s].is_load; eh = 1'b1;
              break;
            end
        checks++;
        if (value[p] != ev || ready[p] != er || hit[p] != eh) begin
          failures++;
          $display("FAIL port %0d x%0d: %h/%b/%b expected %h/%b/%b", p, raddr[p],
                   value[p], ready[p], hit[p], ev, er, eh);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
