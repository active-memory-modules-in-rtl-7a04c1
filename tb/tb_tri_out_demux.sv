// Self-checking testbench of tri_out_demux: random requests with and without
// the fault mark; the request must appear unchanged on the output named by D0
// and nowhere else.
module tb_tri_out_demux;
  import tri_pkg::*;

  req_t in, o0, o1;
  logic fault;
  int   checks = 0, failures = 0;

  tri_out_demux dut (.in(in), .fault(fault), .out0(o0), .out1(o1));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req_t e0, e1;
    for (int i = 0; i < 400; i++) begin
      in = req_t'({$urandom, $urandom});
      in.valid = ($urandom_range(3) != 0);
      fault = ($urandom_range(4) == 0);
      #1;
      e0 = '0; e1 = '0;
      if (in.valid && !fault) begin
        if (in.dst % 2 == 1) e1 = in;
        else                 e0 = in;
      end
      checks += 2;
      if (o0 !== e0) begin failures++; $display("FAIL out0 %h exp %h", o0, e0); end
      if (o1 !== e1) begin failures++; $display("FAIL out1 %h exp %h", o1, e1); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
