// tb_sbox -- self-checking testbench for the four substitution boxes.
//
// Instantiates SB1..SB4 and sweeps all 256 selection bytes, comparing each
// output with the reference model (which builds SB1 from GF(2^8) log tables
// and addresses the tables with its own row/column split). It also checks
// values read off the published tables by hand: the worked example
// 8'b1100_0011 -> row 15, column 0 -> 8'h8C in SB1, the first entry of each
// box and the last entry of each box, and that SB1 is a permutation.
module tb_sbox;
  import secure_cipher_pkg::*;
  import secure_cipher_ref_pkg::*;

  int checks = 0, failures = 0;
  byte_t sel;
  byte_t dout [4];
  logic  seen [256];

  for (genvar i = 0; i < 4; i++) begin : g_box
    sbox #(.SBOX_ID(i + 1)) dut (.sel(sel), .dout(dout[i]));
  end

  task automatic check(string what, byte_t got, byte_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // hand-read values
    sel = 8'hC3; #1; check("SB1 worked example", dout[0], 8'h8C);
    sel = 8'h00; #1;
    check("SB1(0,0)", dout[0], 8'h63); check("SB2(0,0)", dout[1], 8'h04);
    check("SB3(0,0)", dout[2], 8'h82); check("SB4(0,0)", dout[3], 8'h96);
    sel = 8'hFF; #1;
    check("SB1(15,15)", dout[0], 8'h16); check("SB2(15,15)", dout[1], 8'h91);
    check("SB3(15,15)", dout[2], 8'h6F); check("SB4(15,15)", dout[3], 8'h6F);
    // row 0, column 1 = selection 8'b00_0001_00
    sel = 8'h04; #1;
    check("SB1(0,1)", dout[0], 8'h7C); check("SB2(0,1)", dout[1], 8'h93);
    check("SB3(0,1)", dout[2], 8'h89); check("SB4(0,1)", dout[3], 8'h9D);
    // row 1, column 0 = selection 8'b00_0000_01
    sel = 8'h01; #1;
    check("SB1(1,0)", dout[0], 8'hCA); check("SB4(1,0)", dout[3], 8'hA6);

    foreach (seen[i]) seen[i] = 1'b0;
    for (int v = 0; v < 256; v++) begin
      sel = byte_t'(v); #1;
      for (int b = 0; b < 4; b++)
        check($sformatf("SB%0d sel %h", b + 1, v), dout[b], ref_sbox(b + 1, byte_t'(v)));
      seen[dout[0]] = 1'b1;
    end
    begin
      int distinct = 0;
      foreach (seen[i]) if (seen[i]) distinct++;
      checks++;
      if (distinct != 256) begin
        failures++;
        $display("FAIL SB1 is not a permutation (%0d distinct)", distinct);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
