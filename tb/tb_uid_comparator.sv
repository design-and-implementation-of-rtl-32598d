// tb_uid_comparator: self-checking test of the UID comparator.
//
// Checks the default stored UID (0xDEADBEEF) and an overridden one against
// the exact UID, every single-bit flip of it, byte-swapped and random UIDs.
module tb_uid_comparator;

  localparam logic [31:0] ALT = 32'h0A1B_2C3D;

  logic [31:0] uid_a, uid_b;
  logic        match_a, match_b;
  int checks = 0, failures = 0;

  uid_comparator                       dut_a (.uid(uid_a), .match(match_a));
  uid_comparator #(.STORED_UID(ALT))   dut_b (.uid(uid_b), .match(match_b));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    uid_a = 32'hDEAD_BEEF; uid_b = ALT; #1;
    check(match_a, "default stored UID matches");
    check(match_b, "overridden stored UID matches");
    for (int i = 0; i < 32; i++) begin
      uid_a = 32'hDEAD_BEEF ^ (32'd1 << i);
      uid_b = ALT ^ (32'd1 << i);
      #1;
      check(!match_a && !match_b, $sformatf("bit %0d flipped must not match", i));
    end
    uid_a = 32'hEFBE_ADDE; #1;
    check(!match_a, "byte-reversed UID must not match");
    for (int k = 0; k < 200; k++) begin
      uid_a = $urandom; uid_b = $urandom; #1;
      check(match_a == (uid_a == 32'hDEAD_BEEF) && match_b == (uid_b == ALT), "random UID");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
