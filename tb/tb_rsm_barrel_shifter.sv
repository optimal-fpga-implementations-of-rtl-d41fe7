// tb_rsm_barrel_shifter: checks byte rotation in both directions for every
// shift amount on random data, against a byte-index model.
module tb_rsm_barrel_shifter;
  logic [127:0] din, dl, dr;
  logic [3:0]   amt;
  int checks = 0, failures = 0;

  rsm_barrel_shifter #(.LEFT(1'b1)) u_left  (.din(din), .amt(amt), .dout(dl));
  rsm_barrel_shifter #(.LEFT(1'b0)) u_right (.din(din), .amt(amt), .dout(dr));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 64; t++) begin
      din = {$urandom, $urandom, $urandom, $urandom};
      amt = 4'(t);
      #1;
      for (int i = 0; i < 16; i++) begin
        checks += 2;
        if (dl[127-8*i -: 8] != din[127-8*((i + t) % 16) -: 8]) begin
          failures++;
          $display("left amt=%0d byte %0d wrong", amt, i);
        end
        if (dr[127-8*i -: 8] != din[127-8*((i - t + 32) % 16) -: 8]) begin
          failures++;
          $display("right amt=%0d byte %0d wrong", amt, i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
