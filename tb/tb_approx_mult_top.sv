// End-to-end testbench for approx_mult_top at its default (and only) size.
// All four multipliers are driven together: first with 48 reference
// vectors whose expected products come from a separate bit-level model of
// the column reductions, then with random operands, where each product is
// checked against properties that hold for every input: the product is exact
// when one operand is a power of two, and it does not depend on the operand
// order.
//
// It also counts how often each mechanism of the design is exercised and
// counts a failure for any that never occurred:
//   generate bit set by the p/g transform, generate bits lost in an OR merge,
//   approximate compressor, full adder and half adder in an erring input
//   case, a carry travelling along the exact compressor chain of Multiplier
//   B, the two multipliers giving different products, and Multiplier A
//   over- and under-estimating the exact product.
module tb_approx_mult_top;
  typedef struct packed {
    logic [15:0] b16;
    logic [15:0] c16;
    logic [31:0] ya16;
    logic [31:0] yb16;
    logic [7:0]  b8;
    logic [7:0]  c8;
    logic [15:0] ya8;
    logic [15:0] yb8;
  } vec_t;
  localparam int NV = 48;
  localparam vec_t VECTORS [NV] = '{
    '{16'h0007, 16'h0007, 32'h0000002d, 32'h0000002d, 8'h07, 8'h07, 16'h0035, 16'h0035},
    '{16'hffff, 16'hffff, 32'hc0fffefd, 32'heae7fefd, 8'hff, 8'hff, 16'hc005, 16'he905},
    '{16'h0003, 16'h0002, 32'h00000006, 32'h00000006, 8'h03, 8'h02, 16'h0006, 16'h0006},
    '{16'h0008, 16'h0008, 32'h00000040, 32'h00000040, 8'h08, 8'h08, 16'h0040, 16'h0040},
    '{16'h1234, 16'hfedc, 32'h0fc23f70, 32'h121ebf70, 8'h12, 8'hfe, 16'h0ffc, 16'h117c},
    '{16'h73cf, 16'hdda1, 32'h55f7e02f, 32'h6442602f, 8'h8f, 8'hdb, 16'h73dd, 16'h7a5d},
    '{16'hec99, 16'hc7fd, 32'h83fda9b5, 32'hb8cfa9b5, 8'h77, 8'h73, 16'h2895, 16'h3495},
    '{16'h8201, 16'hdae4, 32'h6de79ae4, 32'h6f289ae4, 8'h96, 8'h30, 16'h1be0, 16'h1be0},
    '{16'h2f45, 16'hcdcc, 32'h23546dfc, 32'h25ff6dfc, 8'h83, 8'h79, 16'h3ddb, 16'h3ddb},
    '{16'ha13f, 16'h9d2c, 32'h624542bc, 32'h62ff42bc, 8'hcb, 8'h2f, 16'h233d, 16'h253d},
    '{16'h1818, 16'h7253, 32'h0ab77fd8, 32'h0ac27fd8, 8'h4d, 8'h24, 16'h09d4, 16'h0ad4},
    '{16'h1736, 16'h89e7, 32'h0bc4680a, 32'h0c80680a, 8'hcf, 8'he3, 16'h9385, 16'hb705},
    '{16'hb185, 16'ha26b, 32'h8007f80f, 32'h709ff80f, 8'h0a, 8'h98, 16'h05f0, 16'h05f0},
    '{16'hfb71, 16'h656a, 32'h47dd502a, 32'h6393502a, 8'hf6, 8'h73, 16'h5b82, 16'h6e02},
    '{16'ha767, 16'hbd29, 32'h89a4407f, 32'h7b30c07f, 8'h9d, 8'ha6, 16'h641e, 16'h659e},
    '{16'h2851, 16'h9f85, 32'h18fb7fd5, 32'h191e7fd5, 8'h03, 8'hd4, 16'h027c, 16'h027c},
    '{16'h8743, 16'h102b, 32'h08756041, 32'h088a6041, 8'h0f, 8'h09, 16'h0087, 16'h0087},
    '{16'h30b1, 16'he12b, 32'h32a9e7fb, 32'h2ad367fb, 8'h3d, 8'h99, 16'h2375, 16'h2475},
    '{16'h07b3, 16'hc732, 32'h05c11376, 32'h05fc9376, 8'h76, 8'h53, 16'h2082, 16'h2602},
    '{16'h70c6, 16'h9749, 32'h400bf776, 32'h42a47776, 8'hd7, 8'h32, 16'h1ffe, 16'h297e},
    '{16'h84e5, 16'h3bd0, 32'h1e0117d0, 32'h1f0c17d0, 8'ha3, 8'h4b, 16'h2ec1, 16'h2fc1},
    '{16'h7ff1, 16'h012d, 32'h008149fd, 32'h0095c9fd, 8'ha9, 8'h15, 16'h0ddd, 16'h0ddd},
    '{16'h7513, 16'ha7a1, 32'h5447fff3, 32'h4ca87ff3, 8'h47, 8'h68, 16'h1c58, 16'h1cd8},
    '{16'hff66, 16'h8d1f, 32'h846768aa, 32'h8cc8e8aa, 8'hfe, 8'hee, 16'hbfd4, 16'he754},
    '{16'hd718, 16'h154c, 32'h1043ef20, 32'h11e46f20, 8'hb5, 8'h41, 16'h2df5, 16'h2df5},
    '{16'h50b6, 16'hc20b, 32'h3d0bde42, 32'h3d2d5e42, 8'h3a, 8'h83, 16'h1d9e, 16'h1d9e},
    '{16'h49fe, 16'h079d, 32'h01e53ede, 32'h02323ede, 8'h11, 8'h90, 16'h0990, 16'h0990},
    '{16'hc42b, 16'h1ba1, 32'h10d5f7eb, 32'h152b77eb, 8'h66, 8'h1b, 16'h0aa2, 16'h0aa2},
    '{16'hd8b9, 16'h4a78, 32'h384011f8, 32'h3f0a91f8, 8'h62, 8'h11, 16'h0662, 16'h0662},
    '{16'hf542, 16'h0452, 32'h03ebaea4, 32'h04232ea4, 8'hd8, 8'haf, 16'h85b8, 16'h93b8},
    '{16'h0023, 16'h36a8, 32'h0006f7f8, 32'h000777f8, 8'h35, 8'hed, 16'h2745, 16'h30c5},
    '{16'he907, 16'h0d65, 32'h07ff0c3f, 32'h0c310c3f, 8'h78, 8'h60, 16'h2500, 16'h2d00},
    '{16'hfaf8, 16'hb57a, 32'hbbdf29f0, 32'hb1d929f0, 8'h65, 8'h6b, 16'h20af, 16'h2a2f},
    '{16'h12b2, 16'h90f5, 32'h098021fa, 32'h0a95a1fa, 8'ha1, 8'h32, 16'h1f72, 16'h1f72},
    '{16'hc74c, 16'hacc6, 32'h81d407b8, 32'h868107b8, 8'h45, 8'h56, 16'h15de, 16'h16de},
    '{16'h164f, 16'h4fab, 32'h062054bd, 32'h06f054bd, 8'h55, 8'h03, 16'h00ff, 16'h00ff},
    '{16'hf6cd, 16'h68f9, 32'h476724a5, 32'h6522a4a5, 8'hc2, 8'hec, 16'h90d8, 16'hb2d8},
    '{16'h1e34, 16'h2274, 32'h040e00d0, 32'h041000d0, 8'h3f, 8'hb4, 16'h2b1c, 16'h2b9c},
    '{16'h19de, 16'h02cd, 32'h003f0e9e, 32'h00480e9e, 8'h0f, 8'h77, 16'h05d5, 16'h06d5},
    '{16'hcc09, 16'h7ca0, 32'h50ef7da0, 32'h63537da0, 8'h2d, 8'hae, 16'h1c3e, 16'h1e3e},
    '{16'h8f2d, 16'h303a, 32'h1adff23a, 32'h1af8723a, 8'h72, 8'h82, 16'h39e4, 16'h39e4},
    '{16'h30d0, 16'hfc3b, 32'h358201f0, 32'h301801f0, 8'hbb, 8'hc4, 16'h80ec, 16'h8eec},
    '{16'h2187, 16'h6b52, 32'h0d77f7fe, 32'h0e0d77fe, 8'ha4, 8'h62, 16'h3ec8, 16'h3ec8},
    '{16'h1dd3, 16'h6515, 32'h0a000e0f, 32'h0bc60e0f, 8'h6b, 8'hfd, 16'h5be7, 16'h6967},
    '{16'h367e, 16'h001e, 32'h0005f0d4, 32'h0005f0d4, 8'h45, 8'hdd, 16'h3805, 16'h3b05},
    '{16'hf88e, 16'hf990, 32'hbf6fbbe0, 32'he44dbbe0, 8'hcd, 8'h97, 16'h7227, 16'h78a7},
    '{16'h4ddc, 16'hff76, 32'h42ff6a18, 32'h4db0ea18, 8'he2, 8'h05, 16'h03ea, 16'h046a},
    '{16'h35f1, 16'h2ff3, 32'h095bb683, 32'h0a18b683, 8'h64, 8'hfe, 16'h55f8, 16'h62f8}
  };

  typedef enum int {
    EV_GENERATE, EV_OR_MERGE_LOSS, EV_COMPRESSOR_ERR, EV_FA_ERR, EV_HA_ERR,
    EV_EXACT_CHAIN, EV_A_NE_B, EV_A_OVER, EV_A_UNDER, EV_COUNT
  } event_e;

  logic [15:0] op_b16, op_c16;
  logic [31:0] y16_a, y16_b;
  logic [7:0]  op_b8, op_c8;
  logic [15:0] y8_a, y8_b;
  int checks = 0, failures = 0;
  int events [EV_COUNT];

  approx_mult_top dut (
    .op_b16(op_b16), .op_c16(op_c16), .y16_a(y16_a), .y16_b(y16_b),
    .op_b8(op_b8), .op_c8(op_c8), .y8_a(y8_a), .y8_b(y8_b)
  );

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: b16=%h c16=%h b8=%h c8=%h -> %h %h %h %h",
               what, op_b16, op_c16, op_b8, op_c8, y16_a, y16_b, y8_a, y8_b);
    end
  endtask

  // Samples internal nodes of the 16-bit multipliers after each new input.
  task automatic count_events();
    logic [31:0] exact;
    int g15;
    exact = 32'(op_b16) * 32'(op_c16);
    g15 = 0;
    for (int i = 8; i < 16; i++) g15 += int'(dut.u_mult16_a.g[i][15-i]);
    if (g15 > 0) events[EV_GENERATE]++;
    if (int'(dut.u_mult16_a.g[15][0]) + int'(dut.u_mult16_a.g[14][1])
        + int'(dut.u_mult16_a.g[13][2]) + int'(dut.u_mult16_a.g[12][3]) > 1)
      events[EV_OR_MERGE_LOSS]++;
    if ({dut.u_mult16_a.u_l1_w15_u0.y1, dut.u_mult16_a.u_l1_w15_u0.y2,
         dut.u_mult16_a.u_l1_w15_u0.y3, dut.u_mult16_a.u_l1_w15_u0.y4} inside
        {4'b0101, 4'b0110, 4'b1001, 4'b1010, 4'b1111})
      events[EV_COMPRESSOR_ERR]++;
    if (dut.u_mult16_a.u_l1_w5_u0.y1 && dut.u_mult16_a.u_l1_w5_u0.y2)
      events[EV_FA_ERR]++;
    if (dut.u_mult16_a.u_l1_w4_u0.y1 && dut.u_mult16_a.u_l1_w4_u0.y2)
      events[EV_HA_ERR]++;
    if (dut.u_mult16_b.u_l1_w16_u0.cout) events[EV_EXACT_CHAIN]++;
    if (y16_a != y16_b) events[EV_A_NE_B]++;
    if (y16_a > exact) events[EV_A_OVER]++;
    if (y16_a < exact) events[EV_A_UNDER]++;
  endtask

  initial begin
    logic [31:0] ya_fwd, yb_fwd;
    foreach (events[k]) events[k] = 0;
    for (int k = 0; k < NV; k++) begin
      op_b16 = VECTORS[k].b16; op_c16 = VECTORS[k].c16;
      op_b8  = VECTORS[k].b8;  op_c8  = VECTORS[k].c8;
      #1;
      count_events();
      check(y16_a === VECTORS[k].ya16, "16-bit A reference");
      check(y16_b === VECTORS[k].yb16, "16-bit B reference");
      check(y8_a === VECTORS[k].ya8, "8-bit A reference");
      check(y8_b === VECTORS[k].yb8, "8-bit B reference");
    end
    for (int t = 0; t < 3000; t++) begin
      op_b16 = 16'($urandom); op_c16 = 16'($urandom);
      op_b8 = 8'($urandom); op_c8 = 8'($urandom);
      #1;
      count_events();
      ya_fwd = y16_a; yb_fwd = y16_b;
      {op_b16, op_c16} = {op_c16, op_b16};
      #1;
      check(y16_a === ya_fwd && y16_b === yb_fwd, "operand order");
      op_c16 = 16'(1) << ($urandom % 16);
      op_c8 = 8'(1) << ($urandom % 8);
      #1;
      check(y16_a === 32'(op_b16) * 32'(op_c16) && y16_b === 32'(op_b16) * 32'(op_c16),
            "16-bit power-of-two operand");
      check(y8_a === 16'(op_b8) * 16'(op_c8) && y8_b === 16'(op_b8) * 16'(op_c8),
            "8-bit power-of-two operand");
    end
    for (int k = 0; k < EV_COUNT; k++) begin
      $display("mechanism %s seen %0d times", event_e'(k), events[k]);
      checks++;
      if (events[k] == 0) begin
        failures++;
        $display("FAIL mechanism %s never exercised", event_e'(k));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
