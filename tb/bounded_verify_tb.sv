// Exhaustive bounded check of the three observer properties: every input
// sequence up to a fixed depth is applied, each from reset, and the
// observer's bit is examined in every cycle.
//  * register observer (check_register): must hold for all sequences of
//    (set, new_in) of depth 6
//  * commutativity e :+: f = f :+: e (regex_equiv_obs, free sub-circuits):
//    must hold for all sequences of (start, o1, o2) of depth 5
//  * structural induction for noEmptyString (prove_structural_induction):
//    every cycle is compared with the closed form of each case, over all
//    sequences of (start, a, o1, o2) of depth 4; the number of sequences
//    with a counterexample is reported for the sequence and Input cases,
//    and the alternative and Plus cases must never fail
module bounded_verify_tb;
  int checks = 0, failures = 0;
  int cex_seq = 0, cex_input = 0;

  logic clk = 1'b0, rst;
  logic set, new_in, current, reg_ok;
  logic e_start; logic [1:0] e_o; logic e_ma, e_mb, e_ok; logic [1:0] e_sa, e_sb;
  logic i_start, i_a, i_o1, i_o2;
  logic [4:0] i_st; logic [3:0] i_m, i_cok; logic i_ok;

  always #5 clk = ~clk;

  check_register u_reg (.clk(clk), .rst(rst), .set(set), .new_in(new_in), .current(current), .ok(reg_ok));

  regex_equiv_obs u_eq (
    .clk(clk), .rst(rst), .start(e_start), .sig(1'b0), .circ_match(e_o),
    .match_a(e_ma), .match_b(e_mb), .circ_start_a(e_sa), .circ_start_b(e_sb), .ok(e_ok)
  );

  prove_structural_induction u_ind (
    .clk(clk), .rst(rst), .start(i_start), .a(i_a), .o1(i_o1), .o2(i_o2),
    .seq_start1(i_st[0]), .seq_start2(i_st[1]), .alt_start1(i_st[2]), .alt_start2(i_st[3]), .plus_start1(i_st[4]),
    .seq_match(i_m[0]), .alt_match(i_m[1]), .plus_match(i_m[2]), .input_match(i_m[3]),
    .ok_seq(i_cok[0]), .ok_alt(i_cok[1]), .ok_plus(i_cok[2]), .ok_input(i_cok[3]), .ok(i_ok)
  );

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic do_reset();
    rst = 1'b1;
    @(posedge clk); #1;
    rst = 1'b0;
  endtask

  initial begin
    int v;
    logic prev_sa, x_seq, x_in, f_seq, f_in;
    rst = 1'b0;
    set = 0; new_in = 0; e_start = 0; e_o = '0; i_start = 0; i_a = 0; i_o1 = 0; i_o2 = 0;

    // register observer, depth 6, 2 inputs per cycle
    for (int n = 0; n < (1 << 12); n++) begin
      do_reset();
      for (int c = 0; c < 6; c++) begin
        v = (n >> (2 * c)) & 3;
        {set, new_in} = 2'(v);
        #1;
        checks++;
        if (reg_ok !== 1'b1) begin
          failures++;
          $display("register observer fails: sequence %0d cycle %0d", n, c);
        end
        @(posedge clk); #1;
      end
    end

    // commutativity, depth 5, 3 inputs per cycle
    for (int n = 0; n < (1 << 15); n++) begin
      do_reset();
      for (int c = 0; c < 5; c++) begin
        v = (n >> (3 * c)) & 7;
        {e_start, e_o} = 3'(v);
        #1;
        checks++;
        if (e_ok !== 1'b1) begin
          failures++;
          $display("commutativity fails: sequence %0d cycle %0d", n, c);
        end
        @(posedge clk); #1;
      end
    end

    // structural induction, depth 4, 4 inputs per cycle
    for (int n = 0; n < (1 << 16); n++) begin
      do_reset();
      prev_sa = 1'b0; f_seq = 1'b0; f_in = 1'b0;
      for (int c = 0; c < 4; c++) begin
        v = (n >> (4 * c)) & 15;
        {i_start, i_a, i_o1, i_o2} = 4'(v);
        #1;
        x_seq = !(!(i_start && i_o1) && !(i_o1 && i_o2)) || !(i_start && i_o2);
        x_in  = !(i_start && prev_sa);
        checks++;
        if (i_cok !== {x_in, 1'b1, 1'b1, x_seq} || i_ok !== (x_seq && x_in)) begin
          failures++;
          if (failures < 10) $display("induction observer differs: sequence %0d cycle %0d", n, c);
        end
        if (!i_cok[0]) f_seq = 1'b1;
        if (!i_cok[3]) f_in = 1'b1;
        prev_sa = i_start && i_a;
        @(posedge clk); #1;
      end
      if (f_seq) cex_seq++;
      if (f_in) cex_input++;
    end
    $display("induction: %0d of 65536 sequences break the sequence case, %0d the Input case",
             cex_seq, cex_input);
    if (cex_seq == 0 || cex_input == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
