// tb_route_decode: checks the header decoder against an independent bit-level
// model: output port from the source route at the hop index, VC from the class
// (classes 0..3 on VC 0), length, and the forwarded header with the hop advanced.
module tb_route_decode;
  import qos_pkg::*;
  int checks = 0, failures = 0;
  logic [63:0] hdr_in, hdr_out;
  logic [3:0]  port;
  logic        vc;
  logic [8:0]  len;
  logic [2:0]  tc;

  route_decode #(.NPORTS(16)) dut (.hdr_in, .out_port(port), .vc, .len, .tc, .hdr_out);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s hdr=%h", what, hdr_in); end
  endtask

  initial begin
    for (int n = 0; n < 2000; n++) begin
      int hop;
      logic [63:0] exp_out;
      hdr_in = {$urandom, $urandom};
      hop = $urandom_range(0, 9);
      hdr_in[51:48] = 4'(hop);
      #1;
      check(port == hdr_in[8 + 4*hop +: 4], "port");
      check(vc == (hdr_in[63:61] >= 3'd4), "vc");
      check(len == hdr_in[60:52], "len");
      check(tc == hdr_in[63:61], "tc");
      exp_out = hdr_in;
      exp_out[51:48] = 4'(hop + 1);
      check(hdr_out == exp_out, "hdr_out");
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
