// tb_fema_or_prefix: self-checking test of the or-gate prefix circuit.
// For random bit-vectors of several densities (N = 256) and every level
// selector, v[j] must be 1 exactly when chunks j .. j+2^i-1 all exist and
// are free. An empty selector must give v = 0.
module tb_fema_or_prefix;
  localparam int unsigned N  = 256;
  localparam int unsigned LW = $clog2(N) + 1;
  logic [N-1:0]  bits, v;
  logic [LW-1:0] sel;
  logic [N-1:0]  exp_v;
  int checks = 0, failures = 0;

  fema_or_prefix #(.N(N)) dut (.bits(bits), .sel(sel), .v(v));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 300; t++) begin
      for (int w = 0; w < N / 32; w++) begin
        logic [31:0] r;
        r = $urandom();
        case (t % 4)
          0: r = r & $urandom() & $urandom();      // mostly free
          1: r = r & $urandom();
          2: r = r | $urandom();                   // mostly used
          default: if (($urandom() % 2) != 0) r = '0;     // long free runs
        endcase
        bits[w*32 +: 32] = r;
      end
      if (t == 0) bits = '0;
      for (int i = 0; i <= LW; i++) begin
        sel = (i < LW) ? (LW'(1) << i) : '0;
        for (int j = 0; j < N; j++) begin
          exp_v[j] = 1'b0;
          if (i < LW && j + (1 << i) <= N) begin
            exp_v[j] = 1'b1;
            for (int b = j; b < j + (1 << i); b++) if (bits[b]) exp_v[j] = 1'b0;
          end
        end
        #1;
        checks++;
        if (v !== exp_v) begin
          failures++;
          $display("FAIL level %0d bits=%h v=%h exp=%h", i, bits, v, exp_v);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
