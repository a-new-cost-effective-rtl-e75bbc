// tb_crossbar: random connection patterns through a 16x16 crossbar; each
// enabled output must carry the word and flags of its selected input, and a
// disabled output must show no valid word.
module tb_crossbar;
  import qos_pkg::*;
  localparam int N = 16;
  int checks = 0, failures = 0;
  logic [N-1:0] in_valid, in_last, out_en, out_valid, out_last;
  word_t        in_data [N], out_data [N];
  logic [3:0]   out_sel [N];

  crossbar #(.NPORTS(N)) dut (.*);

  initial begin
    for (int n = 0; n < 500; n++) begin
      in_valid = N'($urandom); in_last = N'($urandom); out_en = N'($urandom);
      for (int i = 0; i < N; i++) begin
        in_data[i] = {$urandom, $urandom};
        out_sel[i] = 4'($urandom);
      end
      #1;
      for (int o = 0; o < N; o++) begin
        checks++;
        if (out_en[o]) begin
          if (out_valid[o] != in_valid[out_sel[o]] || out_last[o] != in_last[out_sel[o]] ||
              out_data[o] != in_data[out_sel[o]]) begin
            failures++; $display("FAIL out %0d", o);
          end
        end else if (out_valid[o] || out_last[o]) begin
          failures++; $display("FAIL idle out %0d", o);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
