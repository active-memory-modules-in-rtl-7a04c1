// Self-checking testbench of tri_se_2x2: random requests on both inputs with
// random fault marks. Expected outputs: the direct input always leaves on the
// output named by D1 (hop count + 1); the stage-3 input leaves on its output
// only when the direct input did not take it; busy names the outputs the
// direct input took; a faulty SE passes nothing.
module tb_tri_se_2x2;
  import tri_pkg::*;

  req_t in_d, in_c, o0, o1;
  logic fault;
  logic [1:0] busy;
  int   checks = 0, failures = 0;

  tri_se_2x2 dut (.in_d(in_d), .in_c(in_c), .fault(fault), .out0(o0), .out1(o1), .busy(busy));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic req_t rnd_req();
    req_t r;
    r = req_t'({$urandom, $urandom});
    r.valid = ($urandom_range(3) != 0);
    r.hops  = 3'($urandom_range(0, 3));
    return r;
  endfunction

  initial begin
    req_t e [2];
    logic [1:0] eb;
    req_t t;
    for (int i = 0; i < 1000; i++) begin
      in_d = rnd_req(); in_c = rnd_req();
      fault = ($urandom_range(5) == 0);
      #1;
      e[0] = '0; e[1] = '0; eb = 2'b00;
      if (!fault) begin
        if (in_d.valid) begin
          t = in_d; t.hops = in_d.hops + 1;
          e[(in_d.dst >> 1) & 1] = t;
          eb[(in_d.dst >> 1) & 1] = 1'b1;
        end
        if (in_c.valid && !e[(in_c.dst >> 1) & 1].valid) begin
          t = in_c; t.hops = in_c.hops + 1;
          e[(in_c.dst >> 1) & 1] = t;
        end
      end
      checks += 3;
      if (o0 !== e[0]) begin failures++; $display("FAIL out0 %h exp %h", o0, e[0]); end
      if (o1 !== e[1]) begin failures++; $display("FAIL out1 %h exp %h", o1, e[1]); end
      if (busy !== eb) begin failures++; $display("FAIL busy %b exp %b", busy, eb); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
