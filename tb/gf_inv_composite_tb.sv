// Exhaustive test of the GF((2^4)^2) inverter: for every nonzero a the
// product a * y, computed here by a separate composite-field multiplier
// (GF(2^4) with x^4+x+1, y^2 = y + {1100}), must be 1; 0 must map to 0.
module gf_inv_composite_tb;
  logic [7:0] a, y;
  int checks = 0, failures = 0;

  gf_inv_composite dut (.a(a), .y(y));

  function automatic logic [3:0] m4(input logic [3:0] p, input logic [3:0] q);
    logic [3:0] r = 0;
    for (int i = 0; i < 4; i++) begin
      if (q[i]) r ^= p;
      p = {p[2:0], 1'b0} ^ (p[3] ? 4'h3 : 4'h0);
    end
    return r;
  endfunction

  function automatic logic [7:0] mc(input logic [7:0] p, input logic [7:0] q);
    logic [3:0] hh = m4(p[7:4], q[7:4]);
    return {hh ^ m4(p[7:4], q[3:0]) ^ m4(p[3:0], q[7:4]), m4(hh, 4'hC) ^ m4(p[3:0], q[3:0])};
  endfunction

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      a = 8'(v); #1;
      checks++;
      if ((v == 0 && y !== 8'h00) || (v != 0 && mc(a, y) !== 8'h01)) begin
        failures++;
        $display("mismatch a=%h y=%h", a, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
