// hit_mask_tb: exhaustive over all 8-bit masks and both values of the illegal line. The
// hidden interrupt may only come out for mask = all ones with the illegal line high.
module hit_mask_tb;
  logic       illegal, int_req;
  logic [7:0] mask;
  int checks = 0, failures = 0;

  hit_mask #(.MASK_W(8)) dut (.illegal, .mask, .int_req);

  initial begin
    for (int i = 0; i < 512; i++) begin
      {illegal, mask} = 9'(i);
      #1;
      checks++;
      if (int_req !== (illegal && mask == 8'hFF)) begin
        failures++;
        $display("FAIL illegal=%b mask=%h got=%b", illegal, mask, int_req);
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
