// tb_prog_pkg: MIPS I instruction encoders and the test program shared by
// the pipeline and core testbenches.
//
// test_program() builds a program that exercises every instruction class
// the core implements (ALU, immediate, shift, multiply, divide, HI/LO moves,
// byte/half/word loads and stores, branches with delay slots, JAL/JR,
// load-use, MTC0/MFC0 of the power-gating mode register, PG-cancel flagged
// instructions) and writes its results to RES_BASE. expected() gives the
// values those words must hold, computed here with SystemVerilog operators
// rather than by the core. The program ends by storing 1 to DONE_ADDR.
package tb_prog_pkg;

  localparam logic [31:0] RES_BASE  = 32'h0000_1000;
  localparam logic [31:0] DONE_ADDR = 32'h0000_3FF0;
  localparam int          NRES      = 48;
  localparam int          LOOP_N    = 10;

  function automatic logic [31:0] r_type(input logic [5:0] fn, input int rd, input int rs,
                                         input int rt, input int sh = 0);
    return {6'h00, 5'(rs), 5'(rt), 5'(rd), 5'(sh), fn};
  endfunction

  function automatic logic [31:0] i_type(input logic [5:0] op, input int rt, input int rs,
                                         input int imm);
    return {op, 5'(rs), 5'(rt), 16'(imm)};
  endfunction

  function automatic logic [31:0] j_type(input logic [5:0] op, input int word_addr);
    return {op, 26'(word_addr)};
  endfunction

  // Set the PG-cancel flag of an ALU/shift/mult/div instruction.
  function automatic logic [31:0] pgc(input logic [31:0] w);
    if (w[31:26] == 6'h00) w[31:26] = 6'h14;
    else                   w[30]    = 1'b1;
    return w;
  endfunction

  localparam logic [31:0] A = 32'h1234_5678;
  localparam logic [31:0] B = 32'hFFFF_FFF9;   // -7

  // Program image, word 0 at address 0.
  function automatic void test_program(output logic [31:0] p [$], input bit flags);
    int k, loop_top;
    p = {};
    p.push_back(i_type(6'h0F, 1, 0, 16'h1234));            // lui  $1,0x1234
    p.push_back(i_type(6'h0D, 1, 1, 16'h5678));            // ori  $1,$1,0x5678
    p.push_back(i_type(6'h09, 2, 0, -7));                  // addiu $2,$0,-7
    p.push_back(r_type(6'h21, 3, 1, 2));                   // addu
    p.push_back(r_type(6'h23, 4, 1, 2));                   // subu
    p.push_back(r_type(6'h24, 5, 1, 2));                   // and
    p.push_back(r_type(6'h25, 6, 1, 2));                   // or
    p.push_back(r_type(6'h26, 7, 1, 2));                   // xor
    p.push_back(r_type(6'h27, 8, 1, 2));                   // nor
    p.push_back(r_type(6'h2A, 9, 2, 1));                   // slt  $9,$2,$1
    p.push_back(r_type(6'h2B, 10, 2, 1));                  // sltu $10,$2,$1
    p.push_back(r_type(6'h00, 11, 0, 1, 4));               // sll  $11,$1,4
    p.push_back(r_type(6'h02, 12, 0, 2, 3));               // srl  $12,$2,3
    p.push_back(r_type(6'h03, 13, 0, 2, 1));               // sra  $13,$2,1
    p.push_back(i_type(6'h09, 14, 0, 5));                  // addiu $14,$0,5
    p.push_back(r_type(6'h04, 15, 14, 1));                 // sllv $15,$1,$14
    p.push_back(r_type(6'h07, 16, 14, 2));                 // srav $16,$2,$14
    p.push_back(r_type(6'h18, 0, 1, 2));                   // mult $1,$2
    p.push_back(r_type(6'h12, 17, 0, 0));                  // mflo $17
    p.push_back(r_type(6'h10, 18, 0, 0));                  // mfhi $18
    p.push_back(r_type(6'h19, 0, 1, 2));                   // multu $1,$2
    p.push_back(r_type(6'h10, 19, 0, 0));                  // mfhi $19
    p.push_back(r_type(6'h1A, 0, 1, 2));                   // div  $1,$2
    p.push_back(r_type(6'h12, 20, 0, 0));                  // mflo $20
    p.push_back(r_type(6'h10, 21, 0, 0));                  // mfhi $21
    p.push_back(r_type(6'h1B, 0, 1, 14));                  // divu $1,$14
    p.push_back(r_type(6'h12, 22, 0, 0));                  // mflo $22
    p.push_back(r_type(6'h10, 23, 0, 0));                  // mfhi $23
    p.push_back(i_type(6'h0D, 24, 0, RES_BASE));           // ori $24,$0,RES_BASE
    for (k = 3; k <= 23; k++)
      p.push_back(i_type(6'h2B, k, 24, 4 * k));            // sw $k,4k($24)
    // Loop: sum of i*i for i = LOOP_N..1, counting iterations in $28.
    p.push_back(i_type(6'h0D, 25, 0, LOOP_N));             // ori $25,$0,N
    p.push_back(r_type(6'h21, 26, 0, 0));                  // addu $26,$0,$0
    p.push_back(r_type(6'h21, 28, 0, 0));                  // addu $28,$0,$0
    loop_top = p.size();
    p.push_back(r_type(6'h18, 0, 25, 25));                 // mult $25,$25
    p.push_back(r_type(6'h12, 27, 0, 0));                  // mflo $27
    p.push_back(flags ? pgc(r_type(6'h21, 26, 26, 27))
                      : r_type(6'h21, 26, 26, 27));        // addu $26,$26,$27
    p.push_back(flags ? pgc(i_type(6'h09, 25, 25, -1))
                      : i_type(6'h09, 25, 25, -1));        // addiu $25,$25,-1
    p.push_back(i_type(6'h05, 0, 25, loop_top - (p.size() + 1)));  // bne $25,$0,top
    p.push_back(flags ? pgc(i_type(6'h09, 28, 28, 1))
                      : i_type(6'h09, 28, 28, 1));         // delay: addiu $28,$28,1
    p.push_back(i_type(6'h2B, 26, 24, 4 * 24));            // sw $26
    p.push_back(i_type(6'h2B, 28, 24, 4 * 25));            // sw $28
    // Byte and half-word accesses around RES_BASE+0x100.
    p.push_back(i_type(6'h2B, 1, 24, 16'h100));            // sw  $1,0x100($24)
    p.push_back(i_type(6'h20, 3, 24, 16'h101));            // lb  $3,0x101
    p.push_back(i_type(6'h24, 4, 24, 16'h103));            // lbu $4,0x103
    p.push_back(i_type(6'h29, 2, 24, 16'h104));            // sh  $2,0x104
    p.push_back(i_type(6'h28, 14, 24, 16'h107));           // sb  $14,0x107
    p.push_back(i_type(6'h21, 5, 24, 16'h104));            // lh  $5,0x104
    p.push_back(i_type(6'h25, 6, 24, 16'h104));            // lhu $6,0x104
    p.push_back(i_type(6'h23, 7, 24, 16'h104));            // lw  $7,0x104
    p.push_back(r_type(6'h21, 8, 7, 1));                   // addu $8,$7,$1 (load-use)
    for (k = 3; k <= 8; k++)
      p.push_back(i_type(6'h2B, k, 24, 4 * (k + 23)));     // sw $k,4(k+23)($24)
    // Branch not taken, then taken with a useful delay slot.
    p.push_back(i_type(6'h04, 1, 2, 2));                   // beq $2,$1,+2 (not taken)
    p.push_back(i_type(6'h09, 9, 0, 11));                  // delay: addiu $9,$0,11
    p.push_back(i_type(6'h09, 9, 9, 100));                 // addiu $9,$9,100 -> 111
    p.push_back(i_type(6'h06, 0, 2, 2));                   // blez $2,+2 (taken)
    p.push_back(i_type(6'h09, 10, 0, 22));                 // delay: addiu $10,$0,22
    p.push_back(i_type(6'h09, 10, 0, 999));                // skipped
    p.push_back(i_type(6'h2B, 9, 24, 4 * 32));             // sw $9
    p.push_back(i_type(6'h2B, 10, 24, 4 * 33));            // sw $10
    // Call and return.
    k = p.size();
    p.push_back(j_type(6'h03, k + 4));                     // jal func
    p.push_back(i_type(6'h09, 11, 0, 33));                 // delay: addiu $11,$0,33
    p.push_back(i_type(6'h2B, 29, 24, 4 * 34));            // sw $29 (after return)
    p.push_back(j_type(6'h02, k + 7));                     // j over func
    p.push_back(i_type(6'h09, 29, 11, 44));                // func: addiu $29,$11,44 (delay of j? no: func entry)
    p.push_back(r_type(6'h08, 0, 31, 0));                  // jr $31
    p.push_back(i_type(6'h2B, 31, 24, 4 * 35));            // delay: sw $31
    // Mode control register: write, read back, restore.
    p.push_back(i_type(6'h09, 12, 0, 5));                  // addiu $12,$0,5
    p.push_back({6'h10, 5'h04, 5'd12, 5'd22, 11'd0});      // mtc0 $12,$22
    p.push_back({6'h10, 5'h00, 5'd13, 5'd22, 11'd0});      // mfc0 $13,$22
    p.push_back(i_type(6'h2B, 13, 24, 4 * 36));            // sw $13
    p.push_back(i_type(6'h09, 12, 0, 15));                 // addiu $12,$0,15
    p.push_back({6'h10, 5'h04, 5'd12, 5'd22, 11'd0});      // mtc0 $12,$22
    // Done.
    p.push_back(i_type(6'h09, 15, 0, 1));                  // addiu $15,$0,1
    p.push_back(i_type(6'h2B, 15, 0, DONE_ADDR));          // sw $15,DONE
    k = p.size();
    p.push_back(j_type(6'h02, k));                         // spin
    p.push_back(32'd0);
  endfunction

  // Expected result words (index = word offset from RES_BASE); mask[i]
  // tells which are checked.
  function automatic void expected(output logic [31:0] e [NRES], output bit m [NRES]);
    logic signed [63:0] sp;
    logic [63:0] up;
    logic [31:0] w, s;
    for (int i = 0; i < NRES; i++) begin e[i] = '0; m[i] = 1'b0; end
    sp = $signed(A) * $signed(B);
    up = {32'd0, A} * {32'd0, B};
    e[3]  = A + B;            e[4]  = A - B;
    e[5]  = A & B;            e[6]  = A | B;
    e[7]  = A ^ B;            e[8]  = ~(A | B);
    e[9]  = 32'd1;            e[10] = 32'd0;
    e[11] = A << 4;           e[12] = B >> 3;
    e[13] = $unsigned($signed(B) >>> 1);
    e[14] = 32'd5;            e[15] = A << 5;
    e[16] = $unsigned($signed(B) >>> 5);
    e[17] = sp[31:0];         e[18] = sp[63:32];
    e[19] = up[63:32];
    e[20] = $unsigned($signed(A) / $signed(B));
    e[21] = $unsigned($signed(A) % $signed(B));
    e[22] = A / 32'd5;        e[23] = A % 32'd5;
    s = 0;
    for (int i = 1; i <= LOOP_N; i++) s += 32'(i * i);
    e[24] = s;                e[25] = 32'(LOOP_N);
    e[26] = {{24{A[15]}}, A[15:8]};   // lb  byte 1
    e[27] = {24'd0, A[31:24]};        // lbu byte 3
    w = {8'h05, 8'h00, B[15:0]};      // word at +0x104 (byte 6 never written)
    e[28] = {{16{B[15]}}, B[15:0]};   // lh
    e[29] = {16'd0, B[15:0]};         // lhu
    e[30] = w;                        // lw
    e[31] = w + A;                    // load-use add
    e[32] = 32'd111;          e[33] = 32'd22;
    e[34] = 32'd77;
    e[36] = 32'd5;
    for (int i = 3; i <= 34; i++) m[i] = 1'b1;
    m[36] = 1'b1;
  endfunction

endpackage
