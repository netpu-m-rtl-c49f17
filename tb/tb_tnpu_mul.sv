// tb_tnpu_mul: checks the TNPU multiplier lanes against a per-element model
// for random words, every precision pair (binary with binary, 2..8-bit
// activations with 2..8-bit weights) and random numbers of valid elements.
`timescale 1ns/1ps
module tb_tnpu_mul;
  import netpu_pkg::*;

  logic [63:0] x, w;
  logic [2:0]  in_prec, w_prec;
  logic [6:0]  nvalid;
  logic signed [15:0] prod [8];
  int checks = 0, failures = 0;

  tnpu_mul dut (.x, .w, .in_prec, .w_prec, .nvalid, .prod);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 4000; it++) begin
      x = {$urandom, $urandom};
      w = {$urandom, $urandom};
      if (it % 3 == 0) begin
        in_prec = 0; w_prec = 0;
        nvalid = 7'($urandom_range(0, 64));
      end else begin
        in_prec = 3'($urandom_range(1, 7));
        w_prec  = 3'($urandom_range(0, 7));
        nvalid  = 7'($urandom_range(0, 8));
      end
      #1;
      for (int j = 0; j < 8; j++) begin
        int e;
        e = 0;
        if (in_prec == 0) begin
          for (int c = 0; c < 8; c++)
            if (j * 8 + c < int'(nvalid)) e += (x[j*8+c] == w[j*8+c]) ? 1 : -1;
        end else if (j < int'(nvalid)) begin
          int xa, wv, ib, wb;
          ib = int'(in_prec) + 1; wb = int'(w_prec) + 1;
          xa = int'(x[j*8 +: 8]) % (1 << ib);
          wv = int'(w[j*8 +: 8]) % (1 << wb);
          if (wb == 1) wv = wv ? 1 : -1;
          else if (wv >= (1 << (wb - 1))) wv -= (1 << wb);
          e = xa * wv;
        end
        checks++;
        if (int'(prod[j]) != e) begin
          failures++;
          if (failures < 10)
            $display("lane %0d: x %h w %h prec %0d/%0d nvalid %0d got %0d exp %0d",
                     j, x[j*8+:8], w[j*8+:8], in_prec, w_prec, nvalid, prod[j], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
