// zone_guard_tb: random accesses around the zone boundary in both modes. A user-mode
// access above the user zone must be refused; everything else granted when requested.
module zone_guard_tb;
  logic        priv, req, grant, fault, in_user;
  logic [31:0] addr;
  int checks = 0, failures = 0;

  zone_guard dut (.priv, .req, .addr, .grant, .fault);

  initial begin
    for (int i = 0; i < 4000; i++) begin
      priv = 1'($urandom);
      req  = 1'($urandom_range(0, 3) != 0);
      case ($urandom_range(0, 3))
        0: addr = 32'h7FFF_FFFF - 32'($urandom_range(0, 3));
        1: addr = 32'h8000_0000 + 32'($urandom_range(0, 3));
        default: addr = $urandom;
      endcase
      in_user = addr[31] == 1'b0;
      #1;
      checks++;
      if (grant !== (req && (priv || in_user)) || fault !== (req && !priv && !in_user)) begin
        failures++;
        $display("FAIL priv=%b req=%b addr=%h grant=%b fault=%b", priv, req, addr, grant, fault);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
