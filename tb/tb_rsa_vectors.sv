// tb_rsa_vectors -- the reference keys of 16 to 1024 bits through the engine.
//
// One engine per modulus size (16, 32, 64, 128, 256, 512, 1024 bits), all
// started together on their reference message, exponent (half the modulus
// length) and modulus. Each rsa_vector_run checks the partial ciphertext, the
// reader's conversion to the reference ciphertext, the exact cycle count and,
// from 32 bits up, that the cycle count is within 2% of the reference count
// for that size (16 bits: the reference count of 1547 is about twice what a
// 8-bit exponent needs, so it is printed but not checked).
module tb_rsa_vectors;
  logic         clock = 0, reset = 1;
  logic [6:0]   done;
  int           chk [7];
  int           fl  [7];
  longint       cyc [7];
  int           checks = 0, failures = 0;
  longint       ticks = 0;

  always #5 clock = ~clock;
  always @(posedge clock) ticks++;

  rsa_vector_run #(
    .SIZE(16),
    .M(16'ha2a9),
    .E(16'hb5),
    .N(16'ha405),
    .CT(16'h9087),
    .REF_CYCLES(0)
  ) u_16 (.clock(clock), .reset(reset), .done(done[0]), .checks(chk[0]), .failures(fl[0]), .cycles(cyc[0]));
  rsa_vector_run #(
    .SIZE(32),
    .M(32'h42857b2d),
    .E(32'hb807),
    .N(32'h91ba9e25),
    .CT(32'h321dd222),
    .REF_CYCLES(2951)
  ) u_32 (.clock(clock), .reset(reset), .done(done[1]), .checks(chk[1]), .failures(fl[1]), .cycles(cyc[1]));
  rsa_vector_run #(
    .SIZE(64),
    .M(64'h8c05a3b70f2c77f0),
    .E(64'hdecd23f5),
    .N(64'hb7a7559fd09d95df),
    .CT(64'h6ce43f82c0d5e0b),
    .REF_CYCLES(13531)
  ) u_64 (.clock(clock), .reset(reset), .done(done[2]), .checks(chk[2]), .failures(fl[2]), .cycles(cyc[2]));
  rsa_vector_run #(
    .SIZE(128),
    .M(128'hc954ba20c2f8b4a6b83c17e8a549337),
    .E(128'hea70c4b359534fa1),
    .N(128'h9b6bed7aabdc0496a105b0ee9e1f70eb),
    .CT(128'h120b6217d2cbff7d6bf114c1f8b940),
    .REF_CYCLES(50352)
  ) u_128 (.clock(clock), .reset(reset), .done(done[3]), .checks(chk[3]), .failures(fl[3]), .cycles(cyc[3]));
  rsa_vector_run #(
    .SIZE(256),
    .M(256'h6f165c7dd2e4221455c83e22f82ea6937bd083be202979d8f98b82066275da2d),
    .E(256'ha036d1086cc095f1e80c7b39a50c6b27),
    .N(256'h9aa9e234e00002eddce162b1c653bb602a100c8ce874c982ba596fa21b05bdfd),
    .CT(256'h89e5b38886f435dcd6dad5e5dd5fae551261011c716a9c3f838235b84dbc1732),
    .REF_CYCLES(194410)
  ) u_256 (.clock(clock), .reset(reset), .done(done[4]), .checks(chk[4]), .failures(fl[4]), .cycles(cyc[4]));
  rsa_vector_run #(
    .SIZE(512),
    .M(512'h4cda3973a0d9b675a6c6d7568a9cb4d677909b5360c8ec7d7306e4536542e252085e9d5f0beed50f2ea88c33c6816bbf1a162df9ce88ca45c8bd4e0207e09a26),
    .E(512'haff9a138f1efe87b9bc32cd12be718d82866ed60f309d03f03c976062e369ac7),
    .N(512'h881548096a0309ecfd46fbcfd3eca90dc349f66c29691296e52c9383a1b2af90ef2d536b3977af6934ff893bba893999347106d42ea04fb61dd99b3fa39bc6b3),
    .CT(512'h686f03a4ecee63c08a15140f580627667fdf0902217e96aebcc7fc63713d279fdebeeff0005fb8c43235c174e60c8b6b7f128868b853155c9f4b8721a3f923d9),
    .REF_CYCLES(821450)
  ) u_512 (.clock(clock), .reset(reset), .done(done[5]), .checks(chk[5]), .failures(fl[5]), .cycles(cyc[5]));
  rsa_vector_run #(
    .SIZE(1024),
    .M(1024'h337c74c49833c785d5fcf356cd72193b45163d1974007b8abc13dbd6e18f4b73da50ed384f81ff0968f9a0005ec7164f1e6678adaf297fff136b3428461b9953a4f6fd7635c943d7a76773ecabc0bc6053ce01f55e5af420f7bd981f2ef81f23d59d3c0a733acb503e798902fdbf2da89186e7d426113638450f4256f2fc513e),
    .E(1024'hea11b5893a53a7d5fddfaaee4d44e30f965e684c3070e6e12897c4e2a286b923d95583859c40aaec70d5f68a2db98783fba988c9c7dfa683a75ac14811b60715),
    .N(1024'h8c1311ae6393937f9b656452d913eb8fad56ca3e54997c44f1deb664afb48d62b4c6645fa0dea24f71e655b4d8903948bf343639b2bd6028b387940d1f2834151a2790b8d4367602c5a9839466269dacaf964156d703d2f13c535f399b855d9195204192a41b9ac52ee1a53cf145f539950684257ae4b62cd6138b5887c1dd91),
    .CT(1024'h440808d226f490a751e147088902563e8435fc4551f3825cc441669ea483d84538a59a87025c235caf633591360b4bae9952938f937816c1808b1271afa138dc6916d8fdf52bf1ecde828b709e297c2ee6b4944c54b8c8f21079115028fdc13726601eaac1e3d6edf6cd3517edfd45e70b6ee842bec1ff4cc5f3ec47fb1b7b08),
    .REF_CYCLES(3235770)
  ) u_1024 (.clock(clock), .reset(reset), .done(done[6]), .checks(chk[6]), .failures(fl[6]), .cycles(cyc[6]));

  initial begin
    wait (ticks == 4000000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clock);
    reset = 0;
    wait (&done);
    for (int i = 0; i < 7; i++) begin
      checks += chk[i];
      failures += fl[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
