// tb_gsg: runs the published throughput experiment on GSG_1, GSG_2, GSG_4 and
// GSG_6 side by side. All four share reset, clock, seed_in and the seeds
// dataseed0 = 4195033 and dataseed1 = 33554431. After the seed is loaded each
// generator has din_valid held high until it has delivered 72 sequence bits;
// the bits must match a bit-serial gold sequence model and the number of
// clocks must be 72, 36, 18 and 12. A second phase reseeds with random values
// and runs 3000 bits per generator with random gaps in din_valid. A last phase
// checks a GSG_6 whose two sequences are offset by DELAY0 = 3 and
// DELAY1 = 100 samples.
module tb_gsg;
  import tb_ref_pkg::*;

  localparam int NBITS = 72;

  logic sclk = 1'b0;
  logic srstb = 1'b0;
  logic seed_in = 1'b0;
  logic [24:0] dataseed0 = '0, dataseed1 = '0;
  logic [3:0] dv = '0;
  logic [0:0] o1;
  logic [1:0] o2;
  logic [3:0] o4;
  logic [5:0] o6;
  int checks = 0, failures = 0;

  always #5 sclk = ~sclk;

  gsg #(.M(1)) u_gsg1 (.srstb, .sclk, .seed_in, .din_valid(dv[0]), .dataseed0, .dataseed1, .data_out(o1));
  gsg #(.M(2)) u_gsg2 (.srstb, .sclk, .seed_in, .din_valid(dv[1]), .dataseed0, .dataseed1, .data_out(o2));
  gsg #(.M(4)) u_gsg4 (.srstb, .sclk, .seed_in, .din_valid(dv[2]), .dataseed0, .dataseed1, .data_out(o4));
  gsg          u_gsg6 (.srstb, .sclk, .seed_in, .din_valid(dv[3]), .dataseed0, .dataseed1, .data_out(o6));

  logic dvd = 1'b0;
  logic [5:0] o6d;
  gsg #(.DELAY0(3), .DELAY1(100)) u_gsg6d (.srstb, .sclk, .seed_in, .din_valid(dvd), .dataseed0, .dataseed1, .data_out(o6d));

  localparam int MS[4] = '{1, 2, 4, 6};

  gold_ref_t ref_m[4];
  int ncyc[4];
  int nbit[4];

  function automatic logic [5:0] outs(int g);
    case (g)
      0: return 6'(o1);
      1: return 6'(o2);
      2: return 6'(o4);
      default: return o6;
    endcase
  endfunction

  task automatic seed_all(logic [24:0] a, logic [24:0] b);
    @(negedge sclk);
    dataseed0 = a; dataseed1 = b; seed_in = 1'b1;
    @(negedge sclk);
    seed_in = 1'b0;
    for (int g = 0; g < 4; g++) begin
      ref_m[g].seed(a, b);
      ncyc[g] = 0;
      nbit[g] = 0;
    end
  endtask

  // Run until every generator has produced `total` bits. With gaps=1 din_valid
  // is dropped at random.
  task automatic run(int total, bit gaps);
    bit done;
    do begin
      done = 1'b1;
      for (int g = 0; g < 4; g++) begin
        dv[g] = (nbit[g] < total) && (!gaps || $urandom_range(0, 2) != 0);
        if (nbit[g] < total) done = 1'b0;
      end
      #1;
      for (int g = 0; g < 4; g++) if (dv[g]) begin
        logic [5:0] o = outs(g);
        for (int r = 0; r < MS[g]; r++) begin
          logic e = ref_m[g].next_bit();
          checks++;
          if (o[r] !== e) begin
            failures++;
            if (failures < 10) $display("GSG_%0d bit %0d: got %b exp %b", MS[g], nbit[g] + r, o[r], e);
          end
        end
        nbit[g] += MS[g];
        ncyc[g]++;
      end
      @(negedge sclk);
    end while (!done);
    dv = '0;
  endtask

  initial begin
    for (int g = 0; g < 4; g++) ref_m[g] = new(25'h9, 25'hF);
    repeat (2) @(negedge sclk);
    srstb = 1'b1;

    // Published experiment: 72 bits, din_valid held high.
    seed_all(25'd4195033, 25'd33554431);
    run(NBITS, 1'b0);
    for (int g = 0; g < 4; g++) begin
      checks++;
      if (ncyc[g] != NBITS / MS[g]) begin
        failures++;
        $display("GSG_%0d took %0d cycles, expected %0d", MS[g], ncyc[g], NBITS / MS[g]);
      end else
        $display("GSG_%0d: %0d bits in %0d cycles", MS[g], NBITS, ncyc[g]);
    end

    // Random seeds, random gaps.
    seed_all(25'($urandom()) | 25'h1, 25'($urandom()) | 25'h2);
    run(3000, 1'b1);

    // Offset phases: reference registers pre-stepped by the two delays.
    begin
      logic [24:0] s0, s1;
      logic [5:0] e;
      s0 = 25'($urandom()) | 25'h10;
      s1 = 25'($urandom()) | 25'h10;
      seed_all(s0, s1);
      repeat (3)   s0 = lfsr_step(s0, 25'h9);
      repeat (100) s1 = lfsr_step(s1, 25'hF);
      for (int c = 0; c < 200; c++) begin
        dvd = 1'b1;
        for (int r = 0; r < 6; r++) begin
          e[r] = s0[0] ^ s1[0];
          s0 = lfsr_step(s0, 25'h9);
          s1 = lfsr_step(s1, 25'hF);
        end
        #1;
        checks++;
        if (o6d !== e) begin
          failures++;
          if (failures < 10) $display("offset GSG_6: got %b exp %b", o6d, e);
        end
        @(negedge sclk);
      end
      dvd = 1'b0;
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge sclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
