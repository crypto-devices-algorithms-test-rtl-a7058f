// aes_bist_core_tb: end-to-end test of the AES crypto-core in all four modes at the default
// parameters (210 SELF_TEST encryptions). Expected values come from an independent
// round-level reference model whose full encryptions agree with a library cipher.
//   MISSION    known-answer vectors; the ciphertext must be in R-out 11 cycles after
//              start, and the mission key must be used (the test key differs).
//   SELF_TEST  with diag set, R-out must show the state at the end of each of the
//              210 encryptions, the last being the golden signature.
//   TPG        35 successive patterns, one per cycle; then, with diag, one pattern per
//              encryption (10 cycles apart).
//   ORA        27 responses with idle gaps (din_valid low) folded into one signature.
//   A new test key written through test_key_load must change the self-test signature.
module aes_bist_core_tb;
  import bist_pkg::*;
  int checks = 0;
  int failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic finish();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (8300) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    finish();
  end

  localparam logic [127:0] MIS_K [6] = '{
    128'h000102030405060708090a0b0c0d0e0f,
    128'h2b7e151628aed2a6abf7158809cf4f3c,
    128'hdb5b5fab8f4d3e27dda1494c73cf256d,
    128'h73ab48767734d7c1c7fde805ec99108d,
    128'h309d6b79965eda32dae445508201e2bd,
    128'h79cb9e86830c71c2cdcc69292f45e678
  };
  localparam logic [127:0] MIS_P [6] = '{
    128'h00112233445566778899aabbccddeeff,
    128'h3243f6a8885a308d313198a2e0370734,
    128'h2fa91425cb0088539d2c67eda13ffe79,
    128'h244caf9c4dabb4817253edc618187993,
    128'he3eff9c0cf44dd3f89e7d15f17362f25,
    128'h986e86cb0ab8ab67a26b7f62b1852f27
  };
  localparam logic [127:0] MIS_C [6] = '{
    128'h69c4e0d86a7b0430d8cdb78070b4c55a,
    128'h3925841d02dc09fbdc118597196a0b32,
    128'hd7581b3982befc6b5a22b186272c580a,
    128'ha7abee39fafe1db7c8bf363c88ebf8ff,
    128'h20cfa7ce809a05d3efb080477385376f,
    128'hd794b04f2eecaddfe80d58ec2c1010ed
  };
  localparam logic [127:0] SELF_SIG [210] = '{
    128'h601ebadce2cf31c2358317c5884aaf03,
    128'hecf2333486859d88d245ee191e1fb577,
    128'ha2bbbfa054ba6145d3760243bb8e5627,
    128'h6319260091e9bbbdb6061ed42b583f75,
    128'hdbc23070d304efa5ab2cac79033b8a8f,
    128'h37e91322f90ab756a6bc17369906c557,
    128'h4534214c147c8f51ac1eaec1a4b8e1a1,
    128'ha2c2674d73cddc7e6f8fe65d46cc21bb,
    128'haaa4f6be0f3fdae90fa7b88050ba4dc1,
    128'hbf68a4c00d631c2f8872be28adf611aa,
    128'hac18889fb1bd729d733018d998c793ff,
    128'h7e4686a4df79e3861a32c652c9fe2936,
    128'hfbaaa4e7d546ebb6064712b943307c19,
    128'h5b54d9ff559e66320c8af5bc85f7c3cd,
    128'h7e844b14b3eb9d2337372be831b45a98,
    128'he02cef5379a72620a50be54ee9e2d812,
    128'h53a4c922312ef9b6a331e83caf50c112,
    128'he5fc71571035457e9aa0aa2ebc63f580,
    128'hc3520a020cb6cbf43e7c9f3ecce8d6ec,
    128'h073a14b0ecfcbc66eac1afe59004a1bc,
    128'hd1223e0f947002abf89d10ab36a5392a,
    128'hbbb1d8cb4dfa377f3015cbdc305307cd,
    128'hfd3348dc683181e6722aaae2f13f0dea,
    128'h38955dd5a03edd142bacff3d1c09d749,
    128'h67dd7a2e0206b29ea4f1e5aad9b77180,
    128'h76287b893262f7142fe0bd1cbe1d22b4,
    128'h4feed4ad0abe91ed5f898c379bf28c6c,
    128'h63fc94d1e1e45d9b5a4297717e98cc64,
    128'hd58b4585d7c8e035b707d2a67e7c20ca,
    128'h631a80092fc2f2af0f2c25278eb3733a,
    128'hbaa9f9f08e024fd9fdf7b50b29c98264,
    128'h3fd52e4a300f8e1fbdf26501c5cff8f0,
    128'h921a30d1eb39482893260814d0a7d3af,
    128'hfd30875cbc5287dcb5115e8e953981de,
    128'h74591dc5eb857da0c383ad4cdf7c9734,
    128'h589bc4296dc23d762d5079ecf84c5f06,
    128'h1e1d5e6806e15eb3240903dc2cce4ac2,
    128'hb6ec896482867dc0987814dfd054a19c,
    128'h4e870900557d824bf6ac1210127b5c3a,
    128'he4bb02d2bc1e770f8fd438cc9b5e9cbd,
    128'hc82786bd6e78cea61b435c1ea8045350,
    128'hc24c35dda66e494e1297d3311aa5d511,
    128'h0e2b0e3337cf34970b368dd0676271e1,
    128'h87dddec8ca78c5c7badee8f9942a43fa,
    128'hbc8b1f1bc88ac455721be204e238cb93,
    128'hb2781af2d9bb44eff3e2d7fe71a91e08,
    128'h3b2a864f1a5738bb4415f37fde81b81b,
    128'h00792d740ebcb24facdc3c86ddcabaaf,
    128'h6637bd7cbda3e6b2250f1e7a19d52ef2,
    128'h7a7163de1eed9961a00db6307350377a,
    128'h41787994658b9c0bb21f33472bac9487,
    128'h2f65514d9e8b9f2344d9730272fc76cb,
    128'ha7d27f8f97bd7a3957ee2c168e0be084,
    128'h05fab4ae50494b1ef8c7dd300eab1a0c,
    128'hd7e7f53e2c4c7890e4db6c50bea2f3df,
    128'h666fc05aa5c0251f275b8377d37deeea,
    128'h103c9ff4791e09805b42a64485b31351,
    128'hd303c2d83017f9f90cc3f2dc54822f80,
    128'h65b4bbd70bf88f00ce74dec9a67f3bd4,
    128'hb81720dc4ade89c33521c6fa7d9b9e06,
    128'hfcf329da2e9af7bc81080c9c8c07ee1e,
    128'ha97f1f39b31256261fc46675c3981360,
    128'hc44d1db128b2f822a8d1f3f54c96f91b,
    128'h1b9529370739d22fc56216b9fdefe29e,
    128'h8430705862ca2debbf6ae00d69d701c4,
    128'h5938815e34fcee128fb29266cb59252b,
    128'hffe11c8e8967b6f1e7fadf9b5706a20d,
    128'hccac0dacd48c43b9bd60d06c71c4165f,
    128'h703d403d1c0d0115fc2b48eaa41d5ec4,
    128'h8c98343a208250855da08771081dcff7,
    128'hc7be45b37ceefbb32f8ffa547da0878e,
    128'h3d096884545b45d3eef6c28f36f8ce4d,
    128'hb9a2fb57379a3dd1fb36bc9feddc31a4,
    128'hbeba3a7ee60366cd648e23603c91c889,
    128'h03a11fb6190c00463e2ff67ed4235e16,
    128'h69095693ec7af8b2e20176287035e274,
    128'h1c113de90b6d54e6ae73b6369a5cd6f1,
    128'h3a1c859e6b762f341c43f14b1453a481,
    128'h2b96a90517697f7881e43ff8308350ed,
    128'hec89249b3ef22d7e9f40090121aa236b,
    128'hc37086e802365534791fed89e720713d,
    128'hc26d6bddac706ecf83b4c66635dbf4e0,
    128'h04aa3230122b95c2a229ca44e0488619,
    128'h26939e0267f5dea1a7ee049df9c83ef3,
    128'h9f4bd15e930eb12e1314019fb789e5ae,
    128'hb82709b19fc55ad94f08834839520f0d,
    128'h58c6211f798646582c924a789482aaea,
    128'h76565f5e36403d5c4ec7ee4a7a994b2f,
    128'h620eaa597d644fd8f8bd8b86f86b85c1,
    128'h149aa0c0bcac89f45efe616d6b5f4011,
    128'h7dcbdafbcc4eba6c206ed578e1bebac6,
    128'hcda836ad42f130f730a35ced9700e6b3,
    128'h1fdc3d0876971822f39eb4e36c773864,
    128'h33310f907e687e6e0e03991f2b2adf95,
    128'hc083e92863a934059b3bacd08f7bfffd,
    128'h82f68d1933c3e20822fc28d84d5a0ca2,
    128'ha29e49e11470a2c88bc1305d9e35b037,
    128'h09ecb48bf286577585a722401670e78c,
    128'hd61f8a23442345d720c7630edae1b808,
    128'h5420a1bc3f5c9dca98fee6f8ab5aeace,
    128'h3492f15aaf4768645d20b9301cd3118f,
    128'h31d9bf18973bf10d5fc5f6a5a4e2421e,
    128'h47b207f3f5dafadc38b24587b6b4af69,
    128'h4d2f76b533515a9ff47df5c94159ceb0,
    128'hb816c30a58a167f5cb487ca973a531d7,
    128'h776e059ebbb9f355e023bdf9aa3079d6,
    128'h75bc8af281f4a5a53072bb361b447eea,
    128'h4e7fdce9daf201df07c72ec888183852,
    128'h4cf2ab9312301b6eb293299d71623162,
    128'h655d98f12b4d0be0afefd32a379c3427,
    128'h081289a389248445dc2daa377259d4cf,
    128'h5acc511de4f2f4b278cd0ceb314125b1,
    128'h8065d183d9ac4a35e6f43281d46639eb,
    128'h0b00eb79b270852b1a2f7ccf4df37eb4,
    128'h4500f0640da89dae72f7fa5e96bb384b,
    128'h7f9da3b71fe523bb53f06c8b589067b1,
    128'h9dd71bd74abb9220f4f99c009e36d2b5,
    128'heaefa390acdc8196c1db006d5b9a7f88,
    128'h26f0bbd290dc11c2e78db3e8ce1a6aa7,
    128'h6c02028fdcb53dc52f5ef8889a531c88,
    128'hbeda36b8796f68804e18899960e8b046,
    128'hbbd6d432a53f45ab9905fae8987316f1,
    128'hf936348d376f0b1a3dfe499a95e1ebba,
    128'h7299530b6fbf273f040c183f0e676a2e,
    128'hc18080375a8064c77ace29f0b5ac0931,
    128'h9b44a1ed750afbe56b0953db0e5e6bf1,
    128'hf7c6a8816818507b824847047125561f,
    128'h50436c54c3bc2ecb2d536261a2694902,
    128'h55490cf4e6d175f3ef58116b73bb3259,
    128'hc2da6ca0da8ecf358bc93dbb803909dd,
    128'h987363472af49d60cc18dbfc2c69a513,
    128'h6720369d7c57b7127bae2b29fce3d80d,
    128'h84bfc6a932ccc3958a33af1d34dd8004,
    128'h39623b085733f6b7363335b72390b2a2,
    128'hb7c5608eda65459613062792c281d61b,
    128'hd6dd21f32008a2a2898af255e7c57167,
    128'hc1300df3ac746a2d99276b3628d081c4,
    128'h71358edc865c11870787ec6435816a4c,
    128'haab1c43750834570a7d3f23f4180932c,
    128'h678252e8f25bd90368a7896f946b9ca1,
    128'h066a9d00c23cf3c35cd19dab2b0a468d,
    128'h099b8e7f0dfaeb9ba9a787d11d79ce47,
    128'he334bb287cdc93183282bc39fb38fde6,
    128'h6742de9569a00781fd9923311c412c47,
    128'hfaedac4eb154c38af357ac4dc45405d2,
    128'h9532e12edcf2a3deeaae4e0e4e12550b,
    128'h9c1c6440565642af342af7cdeb6c6288,
    128'hed3c8a20f9d2e93d1dc27b484a304670,
    128'h8f1fabdd957277f9f24cfbbd573aa3d5,
    128'h81742c71664994626af301704daf3b77,
    128'ha3262a23a736cfd5593e353aff2ce6f6,
    128'he8684984c7be52b3bec9dc2d361445ef,
    128'h3ef6d541ce8323a36dde0fa9ef477001,
    128'h8c6aa5f4601e5e0db7cfbd7a7ee9913f,
    128'h5668fe2bd9ab6a7bccec35869463a29b,
    128'h8ef5cf5b640c10cb4726602746f45c43,
    128'h1ec7a8158a521b97e3c79bbcec37edcd,
    128'hd66df404f2aaa243f2dcf3ef709fbe94,
    128'h49dd069683c2594b8b73e2a8b507e280,
    128'hf5c97135e0238e6e44abe05dd19320bc,
    128'h4fdecc37b3ede441a8debde749a57422,
    128'he1464e92367fa87fb9615bc7e01d3d4a,
    128'hb0ff2c5d30c6076135d700ca60d65f9d,
    128'ha7346de7ffb35027dcf84f106d14d10e,
    128'h8cd8c2df987ea86cfe3a86c86985b095,
    128'he19724360d2b287811e993330a0cfbaa,
    128'h94dd0a00939c80cfbc67e95b286569cf,
    128'h6fea42196f1fafe2ae5f758b38fa5469,
    128'hac05568c2036d3f8f97a45ca7a934746,
    128'hde78ed1de599141f3d950dd3051ec589,
    128'had7ba21d239b428f4e3e22634d04e994,
    128'h13f1be96c439c0866f396cabcc89241b,
    128'h1fe9e42306e20ed166111f844bc80f17,
    128'h93dd938eac0d004458143709624755cc,
    128'h93e0dba67cdd3ac850570d5f9c04cbda,
    128'h8cf7c19b82b4b699128dbaf8f881f5e2,
    128'hf3c937a23f919485599248ddc2269ddf,
    128'hb631e134eba4256e50be3c991560fefe,
    128'h492bc7d9018655283a1bf6f41b39a654,
    128'h89aee2916fddb1a5d103160e0b46c4ac,
    128'h2d518f0134ebcde74fd601cbbef33c8c,
    128'h987e06150c8663b4f539c11abbee7310,
    128'hf1c4e3c1743848f7c5926efb84720ccb,
    128'hce620cf8a7e45d8d3b92c458c7339e01,
    128'hb6f0591ae6ebd9275675cb1ea01090e1,
    128'hea642adaa2fdc09bc0fea8424a306f9d,
    128'h1039983c15cc936e96d2f6925a00b71c,
    128'he127543723888ed6ec9de2671e9baa83,
    128'h34d9715fc17f9d7d23a129a6cf049dff,
    128'h185c0c70c1e031afe9d81d0f63fd2e30,
    128'h1ece6d1d5b99c80d2ebdbfc446cb834c,
    128'h6d00bd1e6e6847ea2122d3295580cb38,
    128'h67cd364253ee1857b1b49699983c4e2b,
    128'ha2fab48f1f18bddc15f52b0b146ec36e,
    128'ha5fe1aa22a30a101dab2ac6c546f0740,
    128'hf96cddfb7626956222d5c6f58583eabe,
    128'hb4a4f30247e30c689f6213542bf3658b,
    128'ha286840e52d5a12200d90d3bd1bc8a63,
    128'h8c58b421f1b13e676eddbc87898b06a3,
    128'h7babaabc071dfd91dfb134c2020c6630,
    128'h1073b422bb691342c610e927233fa0be,
    128'h9fb56b7ea1d5a66a8f820fbf9cb9b098,
    128'h0fbbfd7980e920217ae212ddc7bc38dd,
    128'heb4f5c51f5008559ff6b9fa1d7c44644,
    128'h19a46010d944b11a9fd9b77a1a5542f2,
    128'h7f84830dc09219822a37150d54c48713,
    128'h954a755d8d500d69d7f3c3854a351fd6,
    128'h4188c7d006e631c5c33f47ebd5a54689,
    128'h04c9e4a8fba7268b3834dacca5c1d8e6,
    128'hf2d595e04eedff8e397bb443f7f19c8c
  };
  localparam logic [127:0] TPG_PAT [35] = '{
    128'h98e188422883b9ad3cf65e5d1a4b62b3,
    128'h64c2385652eff4af0b61ef1a25a6d4b4,
    128'h9391f2b994ba49e05a30f4e861770abf,
    128'hfcb9f065d18749d6bd5f5f47262b03bd,
    128'h237f6a1f7cf84deb4c0831b8854f3988,
    128'he1ba0605b38d6174f52c0f751d7abfb6,
    128'h7ac26caa75a378ebdbcc00096846f582,
    128'h2baa501b031b54800f3f9673275c297b,
    128'h0e4960867a306939840bff43943caaa8,
    128'h7b10ef6a13c589cdbed4dcda9458f5bc,
    128'h7a68e26f25da1c429986499a4550bca4,
    128'h66db81e0de1f0b2f25434f19202f8ea2,
    128'h8e5235fe401bcf625778624e42d7057d,
    128'h689173fd5443e708de0fbaafa36555ab,
    128'hd606b18bdfbaa085b943d1d7d450e0a0,
    128'hb4d335abe2e68344da13617aa609703c,
    128'hfa346562dec5fd65bdee1d4820b63b2e,
    128'haa498beadf1913616ebe34c4e740739e,
    128'h41dad8ad65f136d607c21ac348f72fe5,
    128'hda1fc41ab7bee20dd4144ae614a57002,
    128'h3725c0f684afec156b73df66de6a2677,
    128'h19a9f02a7c2f3395dc06e2123dde5514,
    128'hfa3c8666618a0199b8565426bf853e26,
    128'hd73d9e95bdad52edcff1ce7037b49a7c,
    128'h9c3e461b108808564c1bbcec0c5f9f73,
    128'hd2c4a04557ad1e7924d0f4df18e6da17,
    128'h8b0f9fc64876dac833c521d5c51dd038,
    128'h941c62769a31b177d26708585e59a6f9,
    128'he6f5af84b166c51ab1da2cfeb34935ed,
    128'h4ea47c1b5a5b630983c5955e38038ec2,
    128'h02a5969aaac28ec79e7a165ee26fc16a,
    128'h532b8e6feb414f527f0e71de28707611,
    128'h65722dd1b9c8484e8ff490ff6b7fe2c4,
    128'hd1b9cceac2b1949ab4304e2020878789,
    128'hf517d2c386e80161531d7652d889e81c
  };
  localparam logic [127:0] ORA_RESP [27] = '{
    128'hd4ea65d003d716849f8558a628518867,
    128'h09208a650f3ebdd3102b938b8743feb6,
    128'h998092253deffa38e12b2b8f30b17d0b,
    128'h5387f61376c468aec7321cc007b37e14,
    128'h320094ead7a94ded97491e2370c6a5b8,
    128'h4b4d8474a3ea284d3bd0334684e55160,
    128'h15c1d2dfa9964aef012d0ea67ff12229,
    128'h6822a6b24735af1ca7a1149075139237,
    128'hee82ec3ffee5a5b28d1fe1daff666589,
    128'h4105cca7b53302fc154cd2aad7185dda,
    128'h834c687a3acb6266c20ba2c250b601fc,
    128'h902a174f11fa2ac0079dd25a49fe85b0,
    128'h1b98fbe466809a111ba1192ec42b7170,
    128'h111b8aaa62f28d1a4a789cb3d8b9b45c,
    128'haf5570eed8e94b150452ef05f542441d,
    128'hed52a24135b00a5436a80bdf0023b682,
    128'h601e5b45785116080d650372e90794df,
    128'h6b77730f65bd9acbb57a6a1dfaf8cda9,
    128'h32d03fdda123f50190f5380e12b2a414,
    128'h563e9bed45100358acc6d8f2c74c7ccf,
    128'h03e0d681552454f14fab6f3e164f1513,
    128'hec3fbf4dc20ef16468f918d8f6cdb2f8,
    128'hb4ff00ae3f1347de2274ea181e34b3f1,
    128'h77064c2c0f552c9402cdf2af19de2bc1,
    128'hae9ca08b2d7c50487ca07386cc099a1e,
    128'h82450164728a6fcf303a07b28f2df760,
    128'hc4ff64debb5d6b48fc3b66fa30d0b194
  };

  bist_mode_e mode;
  logic rst_n, start, stop, diag, din_valid, din_last, test_key_load, rout_upd, busy, done;
  logic [127:0] din, key, r_out;

  aes_bist_core dut (
    .clk, .rst_n, .mode, .start, .stop, .diag, .din, .din_valid, .din_last, .key,
    .test_key_load, .r_out, .rout_upd, .busy, .done
  );

  initial begin
    int cyc, n;
    rst_n = 1'b0; start = 1'b0; stop = 1'b0; diag = 1'b0; din_valid = 1'b0; din_last = 1'b0;
    test_key_load = 1'b0; mode = MODE_MISSION; din = '0; key = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // MISSION
    for (int i = 0; i < 6; i++) begin
      mode = MODE_MISSION; din = MIS_P[i]; key = MIS_K[i]; start = 1'b1;
      cyc = 0;
      @(negedge clk);
      start = 1'b0; din = '0; key = ~MIS_K[i];  // inputs are only needed in the start cycle
      while (!done) begin
        @(negedge clk);
        cyc++;
      end
      check(r_out == MIS_C[i], $sformatf("mission %0d: got %h", i, r_out));
      check(cyc == 10, $sformatf("mission %0d latency %0d cycles after start cycle", i, cyc));
    end

    // SELF_TEST with intermediate signatures
    mode = MODE_SELF_TEST; din = 128'h73f778aaf6fa5db8656abd72fb710734; key = '0; diag = 1'b1; start = 1'b1;
    n = 0;
    @(negedge clk);
    start = 1'b0; din = '0;
    forever begin
      if (rout_upd) begin
        check(r_out == SELF_SIG[n], $sformatf("self-test signature %0d: got %h", n, r_out));
        n++;
      end
      if (done) break;
      @(negedge clk);
    end
    check(n == 210, $sformatf("%0d signatures seen", n));
    check(r_out == SELF_SIG[209], "final self-test signature");
    diag = 1'b0;

    // TPG: one pattern per cycle
    mode = MODE_TPG; din = 128'ha66b0d389d95847ebd299753a7677796; start = 1'b1;
    n = 0;
    @(negedge clk);
    start = 1'b0;
    while (n < 35) begin
      if (rout_upd) begin
        check(r_out == TPG_PAT[n], $sformatf("pattern %0d: got %h", n, r_out));
        n++;
      end else if (n > 0) begin
        check(1'b0, "pattern missing in a cycle");
      end
      stop = (n == 34);
      @(negedge clk);
    end
    stop = 1'b0;
    check(!busy, "TPG stopped");

    // TPG with diag: one pattern per encryption
    mode = MODE_TPG; din = 128'ha66b0d389d95847ebd299753a7677796; start = 1'b1; diag = 1'b1;
    n = 0;
    @(negedge clk);
    start = 1'b0;
    cyc = 0;
    while (n < 3) begin
      cyc++;
      if (rout_upd) begin
        check(r_out == TPG_PAT[10*n + 9], $sformatf("encryption pattern %0d: got %h", n, r_out));
        check(cyc == 10*(n + 1) + 1, $sformatf("encryption pattern %0d at cycle %0d", n, cyc));
        n++;
      end
      stop = (n == 3);
      @(negedge clk);
    end
    stop = 1'b0; diag = 1'b0;
    check(!busy, "TPG stopped");

    // ORA with gaps in the response stream
    mode = MODE_ORA; start = 1'b1; din = ORA_RESP[0]; din_valid = 1'b1;
    din_last = 1'b0;
    @(negedge clk);
    start = 1'b0;
    n = 1;
    while (n < 27) begin
      din_valid = ($urandom_range(0, 3) != 0);
      din       = din_valid ? ORA_RESP[n] : ~ORA_RESP[n];
      din_last  = din_valid && (n == 26);
      @(negedge clk);
      if (din_valid) n++;
    end
    din_valid = 1'b0; din_last = 1'b0;
    while (!done) @(negedge clk);
    check(r_out == 128'hb2ef54f074bfb1b23c7f2efc5a2eacf4, $sformatf("ORA signature: got %h", r_out));

    // Write a new test key into the shadow register: the next self-test must give a
    // different signature.
    key = 128'h623d8eb7a4ca83b26b52b08d21870f0b; test_key_load = 1'b1;
    @(negedge clk);
    test_key_load = 1'b0; key = '0;
    mode = MODE_SELF_TEST; din = 128'h73f778aaf6fa5db8656abd72fb710734; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
    check(r_out != SELF_SIG[209], "new test key changes the signature");
    finish();
  end
endmodule
