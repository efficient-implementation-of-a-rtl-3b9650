// tb_sign_toggler: exhaustive check of the sign toggler. Every 8-bit LLR value
// is applied with its toggle bit clear and set, on a lane chosen in turn, while
// the other lanes carry random values and random toggle bits. The expected
// result is the LLR itself, or its negation saturated to +127.
module tb_sign_toggler;
  localparam int N = 6;
  logic [N-1:0]        toggle;
  logic [N-1:0][7:0]   llr_in, llr_out;
  int checks = 0, failures = 0;

  sign_toggler dut (.toggle, .llr_in, .llr_out);

  function automatic logic [7:0] expect_llr(logic t, logic [7:0] v);
    int s;
    s = $signed(v);
    if (t) s = -s;
    if (s > 127) s = 127;
    return 8'(s);
  endfunction

  initial begin
    for (int v = 0; v < 256; v++) begin
      for (int t = 0; t < 2; t++) begin
        for (int i = 0; i < N; i++) begin
          llr_in[i] = 8'($urandom());
          toggle[i] = 1'($urandom());
        end
        llr_in[v % N] = 8'(v);
        toggle[v % N] = 1'(t);
        #1;
        for (int i = 0; i < N; i++) begin
          checks++;
          if (llr_out[i] !== expect_llr(toggle[i], llr_in[i])) begin
            failures++;
            $display("lane %0d in %h t %b out %h", i, llr_in[i], toggle[i], llr_out[i]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
