// Self-checking testbench for rand_placement (256 sets, as the 16 KB / 4-way / 16 B IL1).
// Checks: (1) lines of one way-sized block map to all-different sets for any seed;
// (2) whether two lines of different blocks collide depends on the seed, with a rate close
// to 1/sets; (3) the index of a line is the same for the same seed (placement is stable
// within a run).
module rand_placement_tb;
  localparam int LA_W = 28, IDX_W = 8, SETS = 256;
  logic [LA_W-1:0]  line_addr;
  logic [31:0]      seed;
  logic [IDX_W-1:0] set_idx;
  int checks = 0, failures = 0;

  rand_placement #(.LA_W(LA_W), .IDX_W(IDX_W)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end


  initial begin
    // (1) permutation inside a block
    for (int t = 0; t < 20; t++) begin
      bit seen [SETS];
      logic [LA_W-1:0] base;
      logic [31:0] sd;
      base = LA_W'({$urandom, 8'd0});
      sd = $urandom;
      foreach (seen[i]) seen[i] = 0;
      checks++;
      for (int i = 0; i < SETS; i++) begin
        logic [IDX_W-1:0] s;
        line_addr = base | LA_W'(i);
        seed = sd;
        #1;
        s = set_idx;
        if (seen[s]) begin failures++; $display("FAIL block not a permutation"); break; end
        seen[s] = 1;
      end
    end
    // (2) cross-block collisions depend on the seed
    begin
      int coll, trials;
      coll = 0; trials = 0;
      for (int p = 0; p < 16; p++) begin
        logic [LA_W-1:0] a, b;
        int c;
        c = 0;
        a = LA_W'($urandom);
        b = a ^ LA_W'(($urandom % 1000 + 1) << IDX_W);
        for (int k = 0; k < 1024; k++) begin
          logic [31:0] sd;
          logic [IDX_W-1:0] ia, ib;
          sd = $urandom;
          line_addr = a; seed = sd; #1; ia = set_idx;
          line_addr = b; seed = sd; #1; ib = set_idx;
          if (ia == ib) c++;
          trials++;
        end
        coll += c;
        checks++;
        if (c == 1024) begin failures++; $display("FAIL pair always collides"); end
      end
      // expected trials/SETS = 64; accept a wide band
      checks++;
      if (coll < 20 || coll > 160) begin failures++; $display("FAIL collision count %0d of %0d", coll, trials); end
    end
    // (3) stability
    for (int i = 0; i < 100; i++) begin
      logic [LA_W-1:0] a;
      logic [31:0] sd;
      logic [IDX_W-1:0] i1, i2;
      a = LA_W'($urandom);
      sd = $urandom;
      line_addr = a; seed = sd; #1; i1 = set_idx;
      line_addr = ~a; #1;
      line_addr = a; #1; i2 = set_idx;
      checks++;
      if (i1 !== i2) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
